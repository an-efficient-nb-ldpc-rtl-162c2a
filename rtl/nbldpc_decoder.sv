// nbldpc_decoder -- Min-Max decoder for (128,64) regular (2,4) NB-LDPC codes over GF(16).
//
// Partial-parallel architecture with 16 check node units (one per row of H) and a single
// variable node unit. Frame data flow:
//   channel bit LLRs -> symbol_llr_gen -> a priori memory (32 x 80 bit)
//   VNU reads a priori vectors and R messages (through a 16:1 multiplexer over the message
//   memories), writes Q messages into the message memory of the destination check node and
//   sends hard decisions to the parity check;
//   the 16 CNUs each read the Q messages of their row from their own message memory
//   (8 x 80 bit: Q and R of four edges) and write back R messages, all in parallel.
// The control unit alternates VN and CN passes until the parity check holds or 18 iterations
// are done. Messages are 16 LLRs of 5 bits in power representation (see nbldpc_pkg).
//
// Interface:
//   in_valid/in_ready  one symbol per accepted cycle: in_llr[k] is the signed 5-bit LLR of
//                      bit k (coefficient of x^k) of the symbol, LLR = ln(P(0)/P(1));
//                      32 symbols make a frame, symbol 0 first. Decoding starts after the 32nd.
//   out_valid          one-cycle pulse when a frame is decoded; out_cw[n] is symbol n in
//                      polynomial form, out_ok says all parity checks hold, out_iters counts
//                      the check node passes used (0..18).
//   busy               high from the end of loading until out_valid.
// Latency: 32 load cycles, then 115 + 201*k cycles (busy high) for k iterations, 3765 cycles
// per frame at k = 18. At a 60.9 MHz clock (the rate reported for an FPGA implementation of
// this architecture) that is 128 bits per 3765 cycles = 2.07 Mbit/s in the worst case. The architecture, memory sizes and iteration limit
// follow the decoder description; cycle-level scheduling is this design's own.
module nbldpc_decoder
  import nbldpc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [3:0][W_CH-1:0] in_llr,
  output logic                 out_valid,
  output logic                 out_ok,
  output logic [4:0]           out_iters,
  output gf_t [N-1:0]          out_cw,
  output logic                 busy
);

  // ---------------------------------------------------------------- control
  logic        ldr_we, vn_a_zero, vn_b_reg, vn_store, hd_valid;
  logic        pc_start, pc_done, pc_ok, cn_start, cn_cancel, cn_done, cn_busy;
  logic [4:0]  ldr_waddr, ldr_raddr, col;
  logic [3:0]  col_row [DV];
  logic [1:0]  col_slot [DV];
  logic [3:0]  msg_rsel, row_addr;
  logic [2:0]  msg_raddr, msg_waddr;
  logic [M-1:0] msg_we;
  logic [4:0]  row_col [DC];
  gf_t         row_h [DC];
  cnu_ctrl_t   cn_ctrl;

  control_unit u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready,
    .ldr_we, .ldr_waddr, .ldr_raddr,
    .col, .col_row, .col_slot,
    .vn_a_zero, .vn_b_reg, .vn_store,
    .msg_rsel, .msg_raddr, .msg_we, .msg_waddr,
    .hd_valid, .pc_start, .pc_done, .pc_ok,
    .cn_start, .cn_cancel, .cn_done,
    .out_valid, .out_ok, .out_iters, .busy
  );

  cnu_sched u_sched (
    .clk, .rst_n, .start(cn_start), .cancel(cn_cancel),
    .busy(cn_busy), .done(cn_done), .ctrl(cn_ctrl)
  );

  h_rom u_hrom (
    .col, .col_row, .col_slot,
    .row(row_addr), .row_col, .row_h
  );

  // ---------------------------------------------------------------- a priori information
  vec_t sym_llr, l_n;

  symbol_llr_gen u_gen (.bit_llr(in_llr), .sym_llr(sym_llr));

  dist_ram #(.DEPTH(N), .WIDTH(Q * W)) u_ldr (
    .clk, .we(ldr_we), .waddr(ldr_waddr), .wdata(sym_llr),
    .raddr(ldr_raddr), .rdata(l_n)
  );

  // ---------------------------------------------------------------- VNU and parity check
  vec_t       r_sel, q_msg;
  logic [3:0] hd_idx;
  vec_t       mem_rd [M];

  assign r_sel = mem_rd[msg_rsel];   // MUX 16 to 1

  vnu u_vnu (
    .clk, .rst_n, .r_in(r_sel), .l_in(l_n),
    .a_zero(vn_a_zero), .b_reg(vn_b_reg), .store(vn_store),
    .q_out(q_msg), .hd_idx
  );

  parity_check u_pc (
    .clk, .rst_n, .hd_valid, .hd_idx, .start(pc_start),
    .done(pc_done), .ok(pc_ok), .cw(out_cw),
    .row_addr, .row_col, .row_h
  );

  // ---------------------------------------------------------------- message memories and CNUs
  for (genvar m = 0; m < M; m++) begin : g_row
    vec_t       r_out, wdata;
    logic       we;
    logic [2:0] waddr, raddr;

    // write port shared by the CNU (R messages) and the VNU (Q messages)
    assign we    = cn_busy ? cn_ctrl.wr_en : msg_we[m];
    assign waddr = cn_busy ? cn_ctrl.wr_addr : msg_waddr;
    assign wdata = cn_busy ? r_out : q_msg;
    assign raddr = cn_busy ? cn_ctrl.rd_addr : msg_raddr;

    dist_ram #(.DEPTH(8), .WIDTH(Q * W)) u_msg (
      .clk, .we, .waddr, .wdata, .raddr, .rdata(mem_rd[m])
    );

    cnu #(.ROW(m)) u_cnu (
      .clk, .rst_n, .ctrl(cn_ctrl), .mem_rd_data(mem_rd[m]), .r_out
    );
  end

  // the VNU never writes a message memory while the CNUs own its ports
  a_port_owner: assert property (@(posedge clk) disable iff (!rst_n) !(cn_busy && |msg_we));

endmodule
