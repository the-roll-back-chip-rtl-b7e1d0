// rbc_pkg: types and constants shared by the rollback chip (RBC) modules.
//
// The RBC keeps several versions ("mark frames") of every line of
// version-controlled memory so that a Time Warp program can roll back.
// This package holds the two-bit line state of Fig. 7 of the design
// description (old = written bits at OMF and older, new = written bits in
// the frames after OMF up to and including CMF), the address classes, the
// control-register map and the error bits.
//
// The line-state encoding follows the design description. The register map
// and the error bits are this design's own choice: the description only says
// that operations are started by writes to control registers that may be
// placed anywhere in ordinary memory.
package rbc_pkg;

  // Line state (old count, new count):
  //   ST_00: old = 0, new = 1   (seldom-written line, only bit is "new")
  //   ST_01: old = 1, new = 0
  //   ST_10: old = 1, new > 0
  //   ST_11: old > 1, new any
  typedef enum logic [1:0] {
    ST_00 = 2'b00,
    ST_01 = 2'b01,
    ST_10 = 2'b10,
    ST_11 = 2'b11
  } line_state_e;

  // Class of a CPU address.
  typedef enum logic [1:0] {
    ACC_ORDINARY  = 2'd0,  // passed to memory unmodified
    ACC_VERSIONED = 2'd1,  // version-controlled memory, frame field zero
    ACC_FORBIDDEN = 2'd2,  // RBC-managed frames 1..NMF-1: flagged as an error
    ACC_CSR       = 2'd3   // RBC control and status registers
  } acc_kind_e;

  // Control-register byte offsets from CSR_BASE (32-byte block).
  localparam logic [4:0] CSR_SA       = 5'h00;  // R/W: start address SA
  localparam logic [4:0] CSR_STATUS   = 5'h04;  // R: status, W: 1 clears error bit
  localparam logic [4:0] CSR_RESET    = 5'h08;  // W: reset operation
  localparam logic [4:0] CSR_MARK     = 5'h0C;  // W: mark operation
  localparam logic [4:0] CSR_ROLLBACK = 5'h10;  // W: rollback k frames (k in data)
  localparam logic [4:0] CSR_ADVANCE  = 5'h14;  // W: advance GVT k frames (k in data)

  // Sticky error bits in the status register (bits 4:0).
  localparam int ERR_FRAME    = 0;  // access to a non-zero frame field
  localparam int ERR_NOFRAME  = 1;  // mark with no free frame
  localparam int ERR_ROLLBACK = 2;  // rollback past OMF
  localparam int ERR_ADVANCE  = 3;  // advance GVT past CMF
  localparam int ERR_STATE    = 4;  // line with no written bit (illegal state)
  localparam int NERR         = 5;

endpackage
