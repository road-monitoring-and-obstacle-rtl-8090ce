// image_memory_board: the multi-access image memory board.
//
// It feeds the two pipeline processors and takes their results back while
// the camera, the display and the host keep their own buffers:
//  * two processor image memories (frame_memory), one per pipeline processor,
//    each NFRAMES frames of 9-bit pixels;
//  * a two-bank acquisition frame memory written from the Maxbus camera side,
//    a two-bank host interface memory shared with the host bus and two-bank
//    visualization buffers read by the Maxbus display side (bank_buffer);
//  * per processor a scan_controller and a crossbar that chooses, for the
//    main and for the second flow, a frame of the processor's own memory, the
//    acquisition memory or the host interface memory;
//  * write multiplexers: the result flow of either processor can be written
//    into a frame of either processor memory and/or into the visualization or
//    the host interface memory (dst_mask). This is how the road segmentation
//    result of the main processor reaches the obstacle-detection processor.
//    When both processors write the same destination in the same clock the
//    main processor (0) wins; software must avoid it.
//  * interrupt lines: end of processing per processor, end of acquisition.
//
// Register port (reg_*, 8-bit address, 16-bit data, combinational read):
//  0x00 status  [1:0] irq_proc, [2] irq_acq, [4:3] busy; write 1 clears irq
//  0x01 control write [0] swap visualization banks, [1] swap host banks;
//               read [0] vis bank, [1] host bank, [2] acq bank
//  0x10+0x10*p  +0 src_main +1 src_second (0..15 frame, 16 acq, 17 host)
//               +2 dst_mask ([0] mem0 [1] mem1 [2] vis [3] host) +3 dst_frame
//               +4 x0 +5 y0 +6 w +7 h +8 reverse +9 start (any write)
// acq_frame_done (from the Maxbus side) swaps the acquisition banks and
// raises irq_acq.
//
// Timing: the morphobus flows leave two clocks after the scan address (memory
// read register, crossbar register). Buffers, crossbars, muxes and interrupts
// follow the memory board diagram and text; the register map is this
// design's own.
module image_memory_board
  import msm_pkg::*;
#(
  parameter int P       = 264,
  parameter int NFRAMES = 16,
  parameter int IMG_W   = 256,
  parameter int IMG_H   = 256,
  localparam int PA     = $clog2(IMG_W*IMG_H),
  localparam int FA     = $clog2(NFRAMES)
) (
  input  logic          clk,
  input  logic          rst_n,
  // register port
  input  logic          reg_we,
  input  logic [7:0]    reg_addr,
  input  logic [15:0]   reg_wdata,
  output logic [15:0]   reg_rdata,
  // host interface memory, host side
  input  logic          hm_we,
  input  logic [PA-1:0] hm_addr,
  input  logic [8:0]    hm_wdata,
  output logic [8:0]    hm_rdata,
  // acquisition (Maxbus in)
  input  logic          acq_we,
  input  logic [PA-1:0] acq_addr,
  input  logic [7:0]    acq_data,
  input  logic          acq_frame_done,
  // visualization (Maxbus out)
  input  logic [PA-1:0] vis_addr,
  output logic [8:0]    vis_data,
  // morphobus to / from the processors (0 = main, 1 = second)
  output logic [8:0]    mb_main   [NPROC],
  output logic [7:0]    mb_second [NPROC],
  output logic          mb_hen    [NPROC],
  output logic          mb_ven    [NPROC],
  input  logic [8:0]    mb_result [NPROC],
  input  logic          mb_res_hen[NPROC],
  input  logic          mb_res_ven[NPROC],
  // interrupts
  output logic [NPROC-1:0] irq_proc,
  output logic          irq_acq
);
  // ---------------- registers ----------------
  scan_cfg_t cfg [NPROC];
  logic [NPROC-1:0] start, busy, done;
  logic swap_vis, swap_host;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < NPROC; p++) begin
        cfg[p] <= '{src_main: 5'd0, src_second: 5'd1, dst_mask: 4'(1 << p),
                    dst_frame: 4'd2, x0: 9'd0, y0: 9'd0, w: 9'(IMG_W), h: 9'(IMG_H),
                    reverse: 1'b0};
      end
      irq_proc <= '0;
      irq_acq  <= 1'b0;
    end else begin
      for (int p = 0; p < NPROC; p++) begin
        if (done[p]) irq_proc[p] <= 1'b1;
        if (reg_we && reg_addr[7:4] == 4'(p + 1)) begin
          unique case (reg_addr[3:0])
            4'd0: cfg[p].src_main   <= reg_wdata[4:0];
            4'd1: cfg[p].src_second <= reg_wdata[4:0];
            4'd2: cfg[p].dst_mask   <= reg_wdata[3:0];
            4'd3: cfg[p].dst_frame  <= reg_wdata[3:0];
            4'd4: cfg[p].x0         <= reg_wdata[8:0];
            4'd5: cfg[p].y0         <= reg_wdata[8:0];
            4'd6: cfg[p].w          <= reg_wdata[8:0];
            4'd7: cfg[p].h          <= reg_wdata[8:0];
            4'd8: cfg[p].reverse    <= reg_wdata[0];
            default: ;
          endcase
        end
      end
      if (acq_frame_done) irq_acq <= 1'b1;
      if (reg_we && reg_addr == 8'h00) begin
        for (int p = 0; p < NPROC; p++)
          if (reg_wdata[p]) irq_proc[p] <= done[p];
        if (reg_wdata[2]) irq_acq <= acq_frame_done;
      end
    end
  end

  for (genvar p = 0; p < NPROC; p++) begin : g_start
    assign start[p] = reg_we && reg_addr == 8'(16*(p+1) + 9);
  end
  assign swap_vis  = reg_we && reg_addr == 8'h01 && reg_wdata[0];
  assign swap_host = reg_we && reg_addr == 8'h01 && reg_wdata[1];

  // ---------------- scans ----------------
  logic [PA-1:0] rd_pix [NPROC];
  logic [PA-1:0] wr_pix [NPROC];
  logic          s_hen [NPROC], s_ven [NPROC], wr_en [NPROC];

  for (genvar p = 0; p < NPROC; p++) begin : g_scan
    scan_controller #(.P(P), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_scan (
      .clk(clk), .rst_n(rst_n), .start(start[p]),
      .x0(cfg[p].x0), .y0(cfg[p].y0), .w(cfg[p].w), .h(cfg[p].h), .reverse(cfg[p].reverse),
      .rd_pix(rd_pix[p]), .hen(s_hen[p]), .ven(s_ven[p]),
      .res_hen(mb_res_hen[p]), .res_ven(mb_res_ven[p]),
      .wr_en(wr_en[p]), .wr_pix(wr_pix[p]), .busy(busy[p]), .done(done[p])
    );
  end

  // ---------------- write multiplexers ----------------
  // destination d is written by processor 0 if it targets d, else by 1
  logic          dst_we   [4];
  logic [PA-1:0] dst_pix  [4];
  logic [FA-1:0] dst_frm  [4];
  logic [8:0]    dst_data [4];

  always_comb begin
    for (int d = 0; d < 4; d++) begin
      dst_we[d] = 1'b0; dst_pix[d] = '0; dst_frm[d] = '0; dst_data[d] = '0;
      for (int p = NPROC - 1; p >= 0; p--) begin
        if (wr_en[p] && cfg[p].dst_mask[d]) begin
          dst_we[d]   = 1'b1;
          dst_pix[d]  = wr_pix[p];
          dst_frm[d]  = FA'(cfg[p].dst_frame);
          dst_data[d] = mb_result[p];
        end
      end
    end
  end

  // ---------------- buffers ----------------
  logic [8:0] acq_rd  [NPROC];
  logic [8:0] host_rd [NPROC];
  logic [8:0] mem_rd0 [NPROC];
  logic [8:0] mem_rd1 [NPROC];
  logic acq_sel, host_sel, vis_sel;
  logic [8:0] acq_ext_unused, vis_rd0_unused, vis_rd1_unused;

  bank_buffer #(.PIX(IMG_W*IMG_H), .DW(9)) u_acq (
    .clk(clk), .rst_n(rst_n), .swap(acq_frame_done), .sel(acq_sel),
    .ext_we(acq_we), .ext_waddr(acq_addr), .ext_wdata({1'b0, acq_data}),
    .ext_raddr(acq_addr), .ext_rdata(acq_ext_unused),
    .brd_we(1'b0), .brd_waddr('0), .brd_wdata('0),
    .brd_raddr0(rd_pix[0]), .brd_rdata0(acq_rd[0]),
    .brd_raddr1(rd_pix[1]), .brd_rdata1(acq_rd[1])
  );

  bank_buffer #(.PIX(IMG_W*IMG_H), .DW(9)) u_host (
    .clk(clk), .rst_n(rst_n), .swap(swap_host), .sel(host_sel),
    .ext_we(hm_we), .ext_waddr(hm_addr), .ext_wdata(hm_wdata),
    .ext_raddr(hm_addr), .ext_rdata(hm_rdata),
    .brd_we(dst_we[DST_HOST]), .brd_waddr(dst_pix[DST_HOST]), .brd_wdata(dst_data[DST_HOST]),
    .brd_raddr0(rd_pix[0]), .brd_rdata0(host_rd[0]),
    .brd_raddr1(rd_pix[1]), .brd_rdata1(host_rd[1])
  );

  bank_buffer #(.PIX(IMG_W*IMG_H), .DW(9)) u_vis (
    .clk(clk), .rst_n(rst_n), .swap(swap_vis), .sel(vis_sel),
    .ext_we(1'b0), .ext_waddr('0), .ext_wdata('0),
    .ext_raddr(vis_addr), .ext_rdata(vis_data),
    .brd_we(dst_we[DST_VIS]), .brd_waddr(dst_pix[DST_VIS]), .brd_wdata(dst_data[DST_VIS]),
    .brd_raddr0('0), .brd_rdata0(vis_rd0_unused),
    .brd_raddr1('0), .brd_rdata1(vis_rd1_unused)
  );

  for (genvar p = 0; p < NPROC; p++) begin : g_mem
    frame_memory #(.NFRAMES(NFRAMES), .IMG_W(IMG_W), .IMG_H(IMG_H), .DW(9)) u_mem (
      .clk(clk),
      .rd0_addr({FA'(cfg[p].src_main), rd_pix[p]}),   .rd0_data(mem_rd0[p]),
      .rd1_addr({FA'(cfg[p].src_second), rd_pix[p]}), .rd1_data(mem_rd1[p]),
      .we(dst_we[p]), .waddr({dst_frm[p], dst_pix[p]}), .wdata(dst_data[p])
    );

    // crossbar + morphobus output register
    logic h1, v1;
    function automatic logic [8:0] pick(logic [4:0] src, logic [8:0] mem_d,
                                        logic [8:0] acq_d, logic [8:0] host_d);
      if (src == SRC_ACQ)  return acq_d;
      if (src == SRC_HOST) return host_d;
      return mem_d;
    endfunction

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        h1 <= 1'b0; v1 <= 1'b0;
        mb_hen[p] <= 1'b0; mb_ven[p] <= 1'b0;
        mb_main[p] <= '0; mb_second[p] <= '0;
      end else begin
        h1 <= s_hen[p]; v1 <= s_ven[p];
        mb_hen[p] <= h1; mb_ven[p] <= v1;
        mb_main[p]   <= h1 ? pick(cfg[p].src_main, mem_rd0[p], acq_rd[p], host_rd[p]) : 9'd0;
        mb_second[p] <= h1 ? pick(cfg[p].src_second, mem_rd1[p], acq_rd[p], host_rd[p]) [7:0] : 8'd0;
      end
    end
  end

  // ---------------- register read ----------------
  always_comb begin
    reg_rdata = '0;
    if (reg_addr == 8'h00) reg_rdata = 16'({busy, irq_acq, irq_proc});
    else if (reg_addr == 8'h01) reg_rdata = {13'd0, acq_sel, host_sel, vis_sel};
    else begin
      for (int p = 0; p < NPROC; p++)
        if (reg_addr[7:4] == 4'(p + 1))
          unique case (reg_addr[3:0])
            4'd0: reg_rdata = 16'(cfg[p].src_main);
            4'd1: reg_rdata = 16'(cfg[p].src_second);
            4'd2: reg_rdata = 16'(cfg[p].dst_mask);
            4'd3: reg_rdata = 16'(cfg[p].dst_frame);
            4'd4: reg_rdata = 16'(cfg[p].x0);
            4'd5: reg_rdata = 16'(cfg[p].y0);
            4'd6: reg_rdata = 16'(cfg[p].w);
            4'd7: reg_rdata = 16'(cfg[p].h);
            4'd8: reg_rdata = 16'(cfg[p].reverse);
            default: ;
          endcase
    end
  end
endmodule
