// pimm1_prog_unit: programming unit of PIMM1.
//
// Holds the configuration registers of every other unit. A register is
// written when CSN is low, R/WN is low and PROC/PROGN is low (programming
// phase); in the processing phase (PROC/PROGN high) the configuration is
// frozen so that it cannot change during a scan. With CSN low and R/WN high
// the addressed register is read on DATAO (combinational). The pins are the
// ones of the block diagram; the register map (msm_pkg) and the locking rule
// are this design's own. Reset puts the chip in greytone mode with a plain
// copy (point op A, 3x3 centre only, result P0).
module pimm1_prog_unit
  import msm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       proc_progn,
  input  logic       csn,
  input  logic       rwn,
  input  logic [5:0] add,
  input  logic [7:0] datai,
  output logic [7:0] datao,
  output pimm_cfg_t  cfg
);
  logic [7:0] regs [64];

  wire wr = !csn && !rwn && !proc_progn;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 64; i++) regs[i] <= 8'h00;
      regs[R_G0SE] <= 8'h10;   // centre only
      regs[R_G1SE] <= 8'h10;
      regs[R_THRHI] <= 8'hFF;
    end else if (wr) begin
      regs[add] <= datai;
    end
  end

  assign datao = (!csn && rwn) ? regs[add] : 8'h00;

  always_comb begin
    cfg.mode   = pimm_mode_e'(regs[R_MODE][1:0]);
    cfg.gpo_p1 = regs[R_MODE][2];
    cfg.b_par  = regs[R_MODE][3];
    cfg.pt_op  = pt_op_e'(regs[R_PTOP][3:0]);
    cfg.thr_lo = regs[R_THRLO];
    cfg.thr_hi = regs[R_THRHI];
    cfg.g0_op  = g_op_e'(regs[R_G0OP][0]);
    cfg.g0_se  = {regs[R_G0OP][7], regs[R_G0SE]};
    cfg.g1_op  = g_op_e'(regs[R_G1OP][0]);
    cfg.g1_se  = {regs[R_G1OP][7], regs[R_G1SE]};
    cfg.g_comb = g_comb_e'(regs[R_GCOMB][2:0]);
    cfg.r_op   = r_op_e'(regs[R_ROP][0]);
    for (int k = 0; k < NBSTAGE; k++) begin
      cfg.bst[k].op  = b_op_e'(regs[R_BSTAGE + 6'(3*k)][2:0]);
      cfg.bst[k].geo = regs[R_BSTAGE + 6'(3*k)][3];
      cfg.bst[k].fg  = {regs[R_BSTAGE + 6'(3*k)][4], regs[R_BSTAGE + 6'(3*k) + 6'd1]};
      cfg.bst[k].bg  = {regs[R_BSTAGE + 6'(3*k)][5], regs[R_BSTAGE + 6'(3*k) + 6'd2]};
    end
  end
endmodule
