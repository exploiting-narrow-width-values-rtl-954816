// varf_pkg: constants and types shared by the value-aware register file (VARF).
//
// A 64-bit integer register value is stored in two 34-bit partitions
// ("halves"), each with its own narrow flag column. A value that fits in 34
// bits as a sign-extended number is "narrow" and occupies only one half; any
// other ("regular") value occupies both halves, the left half holding
// bits[63:34] under four zero padding bits. The word and half widths, the
// padding and the 512-entry integer register file follow the document; the
// placement-scheme enum lists the three thermal-aware control schemes it
// proposes (register id, access counter, thermal sensor).
package varf_pkg;

  localparam int unsigned XLEN     = 64;              // machine word
  localparam int unsigned HALF_W   = 34;              // width of one partition
  localparam int unsigned UPPER_W  = XLEN - HALF_W;   // 30 bits of a regular value in the left half
  localparam int unsigned PAD_W    = HALF_W - UPPER_W;// 4 padding bits (0000)
  localparam int unsigned NREGS    = 512;             // physical integer registers

  // Placement scheme for narrow values.
  typedef enum logic [1:0] {
    SCHEME_ID = 2'd0,   // register-id: even id -> right half, odd id -> left half
    SCHEME_AC = 2'd1,   // access counters: the less-accessed half
    SCHEME_TS = 2'd2    // thermal sensors: the cooler half
  } scheme_e;

  // Flag pair / half write enables of one register, {left, right}.
  //   2'b11 regular value, 2'b01 narrow in the right half,
  //   2'b10 narrow in the left half, 2'b00 never written.
  typedef struct packed {
    logic left;
    logic right;
  } halves_t;

endpackage
