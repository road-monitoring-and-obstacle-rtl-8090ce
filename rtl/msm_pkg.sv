// msm_pkg: types and constants shared by the morphological sub-module.
//
// The pixel flow between memories and processors is an 8-bit greytone value
// (9 bits on the memory side and on the board's main input/output bus)
// qualified by two video signals, HEN (line active) and VEN (frame active).
// A pixel is part of the image when both are high. The register maps of the
// PIMM1 chip, of a processor board and of the memory board are defined here;
// the document names the programming pins but gives no register map, so the
// map is this design's own.
package msm_pkg;

  // ---------------- PIMM1 ----------------
  typedef enum logic [1:0] {
    MODE_GREY = 2'd0,   // two greytone 3x3 processors in parallel
    MODE_BIN  = 2'd1,   // eight binary 3x3 processors in pipeline
    MODE_REC  = 2'd2    // recursive operator (distance, reconstruction)
  } pimm_mode_e;

  typedef enum logic [3:0] {
    PT_A    = 4'd0,   // A
    PT_ADD  = 4'd1,   // A+B, saturated at 255
    PT_SUB  = 4'd2,   // A-B, saturated at 0
    PT_MIN  = 4'd3,
    PT_MAX  = 4'd4,
    PT_THR  = 4'd5,   // 255 when lo <= A <= hi, else 0
    PT_AND  = 4'd6,   // bitwise Boolean operators
    PT_OR   = 4'd7,
    PT_XOR  = 4'd8,
    PT_NOT  = 4'd9,   // ~A
    PT_SELC = 4'd10,  // C != 0 ? A : B
    PT_B    = 4'd11   // B
  } pt_op_e;

  typedef enum logic {
    G_DIL = 1'b0,     // maximum over the structuring element
    G_ERO = 1'b1      // minimum over the structuring element
  } g_op_e;

  typedef enum logic [2:0] {
    GC_P0       = 3'd0,
    GC_P1       = 3'd1,
    GC_P0_SUB_P1 = 3'd2, // e.g. morphological gradient dilation - erosion
    GC_MIN_Q    = 3'd3,  // geodesic dilation step: min(P0, second flow)
    GC_MAX_Q    = 3'd4,  // geodesic erosion step: max(P0, second flow)
    GC_C_SUB_P0 = 3'd5,  // centre - P0 (residues, top-hat with opening input)
    GC_P0_SUB_C = 3'd6
  } g_comb_e;

  typedef enum logic [2:0] {
    B_PASS  = 3'd0,
    B_DIL   = 3'd1,   // OR over the foreground template
    B_ERO   = 3'd2,   // AND over the foreground template
    B_HMT   = 3'd3,   // hit-or-miss
    B_THICK = 3'd4,   // centre | hit
    B_THIN  = 3'd5,   // centre & ~hit
    B_NOT   = 3'd6
  } b_op_e;

  typedef enum logic {
    R_DIST   = 1'b0,  // min(in, min(left, up) + 1)
    R_RECONS = 1'b1   // mask & (in | left | up)
  } r_op_e;

  typedef struct packed {
    b_op_e      op;
    logic       geo;    // AND the result with the second (mask) flow
    logic [8:0] fg;     // template positions that must be 1 (SE for DIL/ERO)
    logic [8:0] bg;     // template positions that must be 0
  } bstage_cfg_t;

  localparam int NBSTAGE = 8;

  typedef struct packed {
    pimm_mode_e  mode;
    logic        gpo_p1;   // GPO carries greytone processor 1 instead of the second flow
    logic        b_par;    // binary stages side by side on the same window, results ORed
    pt_op_e      pt_op;
    logic [7:0]  thr_lo;
    logic [7:0]  thr_hi;
    g_op_e       g0_op;
    logic [8:0]  g0_se;
    g_op_e       g1_op;
    logic [8:0]  g1_se;
    g_comb_e     g_comb;
    r_op_e       r_op;
    bstage_cfg_t [NBSTAGE-1:0] bst;
  } pimm_cfg_t;

  // PIMM1 register addresses (8-bit registers)
  localparam logic [5:0] R_MODE   = 6'h00; // [1:0] mode, [2] gpo_p1, [3] binary stages in parallel
  localparam logic [5:0] R_PTOP   = 6'h01;
  localparam logic [5:0] R_THRLO  = 6'h02;
  localparam logic [5:0] R_THRHI  = 6'h03;
  localparam logic [5:0] R_G0OP   = 6'h04; // [0] op, [7] se[8]
  localparam logic [5:0] R_G0SE   = 6'h05; // se[7:0]
  localparam logic [5:0] R_G1OP   = 6'h06;
  localparam logic [5:0] R_G1SE   = 6'h07;
  localparam logic [5:0] R_GCOMB  = 6'h08;
  localparam logic [5:0] R_ROP    = 6'h09;
  localparam logic [5:0] R_BSTAGE = 6'h10; // 3 per stage: op, fg[7:0], bg[7:0]
  //   op register: [2:0] op, [3] geo, [4] fg[8], [5] bg[8]

  // Structuring-element bit numbering: bit 3*row + col, row 0 = line above,
  // col 0 = left; bit 4 is the centre.

  function automatic logic [7:0] sat_add(logic [7:0] a, logic [7:0] b);
    logic [8:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[8] ? 8'hFF : s[7:0];
  endfunction

  function automatic logic [7:0] sat_sub(logic [7:0] a, logic [7:0] b);
    return (a > b) ? a - b : 8'h00;
  endfunction

  // ---------------- Processor board ----------------
  // Board address: [15:12] target, [11:0] index
  localparam logic [3:0] BT_LUT_IN  = 4'd4;   // index 0..511, data [8:0]
  localparam logic [3:0] BT_LUT_OUT = 4'd5;   // index 0..255, data [8:0]
  localparam logic [3:0] BT_CTRL    = 4'd6;   // board registers
  localparam logic [3:0] BT_HIST    = 4'd7;   // 0..255 bins; write clears
  //   targets 0..3: PIMM1 chip n, index[5:0] = register
  //   BT_CTRL index 0: [0] PROC (1 = processing, registers locked)
  //           index 1: [3:0] second-flow mux, bit n = 1: DIB of chip n+1 from GPO n
  //           index 2..5: resynchronisation delay of delay line n, in clocks

  // ---------------- Memory board ----------------
  localparam int NPROC = 2;   // processor 0 = main pipeline, 1 = second pipeline
  // source codes of a flow
  localparam logic [4:0] SRC_ACQ  = 5'd16;
  localparam logic [4:0] SRC_HOST = 5'd17;
  // destination mask bits
  localparam int DST_MEM0 = 0, DST_MEM1 = 1, DST_VIS = 2, DST_HOST = 3;

  typedef struct packed {
    logic [4:0] src_main;   // 0..15 frame of own memory, SRC_ACQ, SRC_HOST
    logic [4:0] src_second;
    logic [3:0] dst_mask;
    logic [3:0] dst_frame;
    logic [8:0] x0, y0, w, h;
    logic       reverse;    // scan the window in reverse video order
  } scan_cfg_t;

endpackage
