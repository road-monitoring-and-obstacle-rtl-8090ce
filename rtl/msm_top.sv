// msm_top: the morphological sub-module (MSM) of a road-monitoring vehicle.
//
// Two pipeline processors built from PIMM1 morphology chips share one
// multi-access image memory board:
//  * processor 0, the main pipeline (two boards, eight PIMM1), runs the
//    continuous road/lane segmentation (temporal filter, gradient, watershed
//    by repeated binary thickenings on a log2-compressed image);
//  * processor 1, the second pipeline (one board, four PIMM1), runs the
//    obstacle detection on the regions of interest.
// The memory board connects to processor 0 through morphobus 2 (plus
// morphobus 3 between the two boards of processor 0) and to processor 1
// through morphobus 1. The CPU board, the Maxbus acquisition/display board
// and the clock generator are outside this RTL: their connections are the
// host bus, the acq_* / vis_* ports and clk.
//
// Host bus (replaces the VSB bus of the original system; one access per
// clock, read data one clock after host_re):
//   host_addr[19:18] = 0  memory-board registers, host_addr[7:0]
//                    = 1  host interface memory (host bank), host_addr[15:0]
//                    = 2  main pipeline processor, host_addr[17:0]
//                         ([17:16] board, [15:12] target, [11:0] index)
//                    = 3  second pipeline processor, host_addr[17:0]
// irq_proc[p] signals the end of a processing scan of processor p, irq_acq
// the end of a camera frame.
module msm_top
  import msm_pkg::*;
#(
  parameter int P       = 264,   // clocks per video line (256 pixels + blanking)
  parameter int NFRAMES = 16,
  parameter int IMG_W   = 256,
  parameter int IMG_H   = 256,
  localparam int PA     = $clog2(IMG_W*IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host (VSB side)
  input  logic          host_we,
  input  logic          host_re,
  input  logic [19:0]   host_addr,
  input  logic [15:0]   host_wdata,
  output logic [15:0]   host_rdata,
  output logic [1:0]    irq_proc,
  output logic          irq_acq,
  // Maxbus acquisition
  input  logic          acq_we,
  input  logic [PA-1:0] acq_addr,
  input  logic [7:0]    acq_data,
  input  logic          acq_frame_done,
  // Maxbus visualization
  input  logic [PA-1:0] vis_addr,
  output logic [8:0]    vis_data
);
  wire [1:0] region = host_addr[19:18];

  logic [8:0]  mb_main   [NPROC];
  logic [7:0]  mb_second [NPROC];
  logic        mb_hen    [NPROC];
  logic        mb_ven    [NPROC];
  logic [8:0]  mb_result [NPROC];
  logic [7:0]  mb_sec_out[NPROC];
  logic        mb_res_hen[NPROC];
  logic        mb_res_ven[NPROC];

  logic [15:0] reg_rd, main_rd, second_rd;
  logic [8:0]  hm_rd;

  image_memory_board #(.P(P), .NFRAMES(NFRAMES), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_mem (
    .clk(clk), .rst_n(rst_n),
    .reg_we(host_we && region == 2'd0), .reg_addr(host_addr[7:0]),
    .reg_wdata(host_wdata), .reg_rdata(reg_rd),
    .hm_we(host_we && region == 2'd1), .hm_addr(host_addr[PA-1:0]),
    .hm_wdata(host_wdata[8:0]), .hm_rdata(hm_rd),
    .acq_we(acq_we), .acq_addr(acq_addr), .acq_data(acq_data), .acq_frame_done(acq_frame_done),
    .vis_addr(vis_addr), .vis_data(vis_data),
    .mb_main(mb_main), .mb_second(mb_second), .mb_hen(mb_hen), .mb_ven(mb_ven),
    .mb_result(mb_result), .mb_res_hen(mb_res_hen), .mb_res_ven(mb_res_ven),
    .irq_proc(irq_proc), .irq_acq(irq_acq)
  );

  pipeline_processor #(.P(P), .NBOARDS(2), .HIST_MASK(1)) u_main (
    .clk(clk), .rst_n(rst_n),
    .main_in(mb_main[0]), .second_in(mb_second[0]), .hen(mb_hen[0]), .ven(mb_ven[0]),
    .result(mb_result[0]), .second_out(mb_sec_out[0]),
    .heno(mb_res_hen[0]), .veno(mb_res_ven[0]),
    .cfg_we(host_we && region == 2'd2), .cfg_addr(host_addr[17:0]),
    .cfg_wdata(host_wdata), .cfg_rdata(main_rd)
  );

  pipeline_processor #(.P(P), .NBOARDS(1), .HIST_MASK(1)) u_second (
    .clk(clk), .rst_n(rst_n),
    .main_in(mb_main[1]), .second_in(mb_second[1]), .hen(mb_hen[1]), .ven(mb_ven[1]),
    .result(mb_result[1]), .second_out(mb_sec_out[1]),
    .heno(mb_res_hen[1]), .veno(mb_res_ven[1]),
    .cfg_we(host_we && region == 2'd3), .cfg_addr(host_addr[17:0]),
    .cfg_wdata(host_wdata), .cfg_rdata(second_rd)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) host_rdata <= '0;
    else if (host_re) begin
      unique case (region)
        2'd0: host_rdata <= reg_rd;
        2'd1: host_rdata <= {7'd0, hm_rd};
        2'd2: host_rdata <= main_rd;
        default: host_rdata <= second_rd;
      endcase
    end
  end
endmodule
