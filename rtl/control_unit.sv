// control_unit -- sequencer of the (16 CNU, 1 VNU) decoder.
//
// Flow of one frame:
//   LOAD  accept 32 symbols (one per cycle while in_ready) and write their a priori vectors
//         into the LLR memory;
//   VN    for each variable node n = 0..31, three VNU cycles (see vnu): Q to the first check
//         node, Q to the second, a posteriori sum and hard decision. In the first pass the
//         check messages are replaced by 0, so Q = L. 96 cycles;
//   CHK   one cycle that starts the parity check and, unless the iteration limit is reached,
//         the check node pass; then wait for the parity check result (17 cycles);
//   CN    wait for the 16 CNUs (104 cycles from their start), count the iteration, back to VN;
//   DONE  one cycle with out_valid.
// Decoding stops when all parity checks hold (the running CN pass is cancelled) or after
// MAX_ITER check node passes. Running the parity check in parallel with the next CN pass is
// this design's choice; it hides the check's latency. Cycle budget per frame:
//   32 (load) + 96 (first VN) + k * (1 + 104 + 96) + 1 + 17 (check) + 1 (done)
//   = 147 + 201 k for k iterations, where k = MAX_ITER when the word does not converge.
// Message memory addressing during VN: read R of slot j at address 4+j through the 16:1
// multiplexer (msg_rsel), write Q of slot j at address j of one memory (msg_we one-hot).
module control_unit
  import nbldpc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // frame input
  input  logic        in_valid,
  output logic        in_ready,
  // a priori LLR memory
  output logic        ldr_we,
  output logic [4:0]  ldr_waddr,
  output logic [4:0]  ldr_raddr,
  // H ROM, column port
  output logic [4:0]  col,
  input  logic [3:0]  col_row  [DV],
  input  logic [1:0]  col_slot [DV],
  // VNU
  output logic        vn_a_zero,
  output logic        vn_b_reg,
  output logic        vn_store,
  // message memories during the VN pass
  output logic [3:0]  msg_rsel,
  output logic [2:0]  msg_raddr,
  output logic [M-1:0] msg_we,
  output logic [2:0]  msg_waddr,
  // parity check
  output logic        hd_valid,
  output logic        pc_start,
  input  logic        pc_done,
  input  logic        pc_ok,
  // CNU sequencer
  output logic        cn_start,
  output logic        cn_cancel,
  input  logic        cn_done,
  // result
  output logic        out_valid,
  output logic        out_ok,
  output logic [4:0]  out_iters,
  output logic        busy
);

  typedef enum logic [2:0] {S_LOAD, S_VN, S_CHK0, S_CHK, S_CN, S_DONE} state_t;

  state_t     state;
  logic [4:0] cnt;       // load counter / column
  logic [1:0] ph;        // VNU cycle within a column
  logic       first;     // first VN pass of the frame
  logic [4:0] iter;      // check node passes done
  logic       vn_phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_LOAD;
      cnt    <= '0;
      ph     <= '0;
      first  <= 1'b1;
      iter   <= '0;
      out_ok <= 1'b0;
    end else begin
      case (state)
        S_LOAD:
          if (in_valid) begin
            cnt <= cnt + 5'd1;
            if (cnt == 5'(N - 1)) begin
              state <= S_VN;
              ph    <= '0;
              first <= 1'b1;
              iter  <= '0;
            end
          end
        S_VN:
          if (ph == 2'd2) begin
            ph  <= '0;
            cnt <= cnt + 5'd1;
            if (cnt == 5'(N - 1)) state <= S_CHK0;
          end else ph <= ph + 2'd1;
        S_CHK0: state <= S_CHK;
        S_CHK:
          if (pc_done) begin
            out_ok <= pc_ok;
            if (pc_ok || iter == 5'(MAX_ITER)) state <= S_DONE;
            else state <= S_CN;
          end
        S_CN:
          if (cn_done) begin
            iter  <= iter + 5'd1;
            first <= 1'b0;
            state <= S_VN;
          end
        default: state <= S_LOAD;   // S_DONE
      endcase
    end
  end

  always_comb begin
    in_ready  = (state == S_LOAD);
    ldr_we    = (state == S_LOAD) && in_valid;
    ldr_waddr = cnt;
    ldr_raddr = cnt;
    col       = cnt;
    vn_phase  = (state == S_VN);
    vn_a_zero = first;
    vn_b_reg  = (ph == 2'd2);
    vn_store  = vn_phase && (ph == 2'd0);
    msg_rsel  = (ph == 2'd0) ? col_row[1] : col_row[0];
    msg_raddr = (ph == 2'd0) ? {1'b1, col_slot[1]} : {1'b1, col_slot[0]};
    msg_waddr = (ph == 2'd0) ? {1'b0, col_slot[0]} : {1'b0, col_slot[1]};
    msg_we    = '0;
    if (vn_phase && ph != 2'd2)
      msg_we[(ph == 2'd0) ? col_row[0] : col_row[1]] = 1'b1;
    hd_valid  = vn_phase && (ph == 2'd2);
    pc_start  = (state == S_CHK0);
    cn_start  = (state == S_CHK0) && (iter != 5'(MAX_ITER));
    cn_cancel = (state == S_CHK) && pc_done && pc_ok;
    out_valid = (state == S_DONE);
    out_iters = iter;
    busy      = (state != S_LOAD);
  end

  // handshakes with the check node sequencer and the parity check
  a_cn_done: assert property (@(posedge clk) disable iff (!rst_n) cn_done |-> state == S_CN);
  a_pc_done: assert property (@(posedge clk) disable iff (!rst_n) pc_done |-> state == S_CHK);

endmodule
