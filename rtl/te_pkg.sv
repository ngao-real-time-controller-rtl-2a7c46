// te_pkg -- shared types and constants of the tomography engine.
//
// The tomography engine (TE) is a 3-D systolic array of identical processing
// elements (PEs) driven in lock-step by one control word. This package holds
// the word sizes, the layout of that control word and the instruction format
// of the Cycle Accurate Control Sequencer (CACS).
//
// Taken from the design description: 18-bit data words on every path, 48-bit
// MAC accumulators, a 24-bit sequencer instruction whose bits 23..20 are the
// idle, real-counter-load, imaginary-counter-load and branch flags, with the
// low-order bits carrying an address, a count or a new control-bus value.
// This design's own choices: the 20-bit control bus field layout below, the
// encodings of every field, and the 11-bit coefficient address (the PE figure
// shows accum_real[10:0] as an alternative RAM address).
package te_pkg;

  localparam int unsigned WORD_W   = 18;  // data path width
  localparam int unsigned ACC_W    = 48;  // MACC accumulator width
  localparam int unsigned COEF_AW  = 11;  // coefficient RAM address width
  localparam int unsigned INSTR_W  = 24;  // CACS instruction width
  localparam int unsigned CBUS_W   = 20;  // control bus width (instruction bits 19..0)
  localparam int unsigned STATUS_W = 8;   // status bits seen by CACS branches

  typedef logic signed [WORD_W-1:0] word_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Source of a PE's neighbour input (the switching lattice).
  typedef enum logic [1:0] {
    DIR_H    = 2'd0,   // horizontal neighbour (x-1), row ring
    DIR_V    = 2'd1,   // vertical neighbour (y-1), column ring
    DIR_L    = 2'd2,   // next layer PE (k-1), layer ring
    DIR_ZERO = 2'd3    // constant zero
  } dir_e;

  // Data path source inside the PE.
  typedef enum logic [1:0] {
    SRC_NEIGH = 2'd0,  // selected neighbour
    SRC_LOOP  = 2'd1,  // own output (loopback path)
    SRC_ONE   = 2'd2,  // constant 1
    SRC_RSVD  = 2'd3   // behaves as SRC_NEIGH
  } src_e;

  // Output register switch (switch_flop[1:0]).
  typedef enum logic [1:0] {
    SW_PASS   = 2'b00, // out <= data path (one register per hop)
    SW_DELAY  = 2'b01, // out <= delay register (two registers per hop)
    SW_ACC_RE = 2'b10, // out <= scaled real accumulator, delay <= scaled imag accumulator
    SW_ACC_IM = 2'b11  // out <= scaled imaginary accumulator
  } sw_e;

  // MACC operation.
  typedef enum logic [1:0] {
    MAC_HOLD = 2'd0,   // P unchanged
    MAC_LOAD = 2'd1,   // P <= A*B
    MAC_ADD  = 2'd2,   // P <= P + A*B
    MAC_SUB  = 2'd3    // P <= P - A*B
  } mac_op_e;

  // Real-MACC B operand / RAM port A mode.
  typedef enum logic [1:0] {
    RA_COEF  = 2'd0,   // B = RAM[counter_A]
    RA_INDEX = 2'd1,   // B = RAM[accum_real[10:0]] (table look-up)
    RA_DATA  = 2'd2,   // B = data path (squares)
    RA_WRITE = 2'd3    // RAM[counter_A] <= data path, B = RAM[counter_A]
  } ra_mode_e;

  // Control bus, bit 19 down to bit 0.
  typedef struct packed {
    logic     evt;      // 19: event strobe to the frame controller
    logic     ssq_en;   // 18: accumulate sum of squares at the row boundary
    logic     recirc;   // 17: boundaries recirculate (1) or take external data (0)
    logic [4:0] shift;  // 16..12: accumulator bit-select offset
    ra_mode_e ra_mode;  // 11..10
    mac_op_e  im_op;    //  9..8
    mac_op_e  re_op;    //  7..6
    sw_e      sw;       //  5..4
    src_e     src;      //  3..2
    dir_e     dir;      //  1..0
  } cbus_t;

  // CACS instruction flag bits.
  localparam int unsigned I_IDLE   = 23;
  localparam int unsigned I_LDRE   = 22;
  localparam int unsigned I_LDIM   = 21;
  localparam int unsigned I_BRANCH = 20;

  // Frame controller status bits, as seen by CACS branch conditions.
  localparam int unsigned ST_FRAME_GO  = 1;  // a frame start is pending
  localparam int unsigned ST_CONTINUE  = 2;  // another iteration is allowed
  localparam int unsigned ST_CONVERGED = 3;  // last error below the limit
  localparam int unsigned ST_ITER_MAX  = 4;  // iteration limit reached
  localparam int unsigned ST_TOO_LATE  = 5;  // too close to the end of frame

  // Saturating bit select: 18 bits of (acc >>> sh).
  function automatic word_t bit_select(input acc_t acc, input logic [4:0] sh);
    acc_t s;
    s = acc >>> sh;
    if (s > acc_t'(2**(WORD_W-1) - 1))       return word_t'(2**(WORD_W-1) - 1);
    else if (s < -acc_t'(2**(WORD_W-1)))     return word_t'(-(2**(WORD_W-1)));
    else                                      return s[WORD_W-1:0];
  endfunction

endpackage
