// cnu_sched -- sequencer of the check node units (part of the control unit).
//
// Produces the control word that all 16 CNUs share for one check node pass. Timing, counted
// from the cycle after start:
//   1 cycle   pre-load: read Q1 into L2
//   6 steps   each 1 load cycle (read one message, optionally write the previous R) and
//             16 compute cycles (15 shift, 1 zero)
//   1 cycle   write the last R message
// i.e. CN_CYCLES = 104 cycles, after which done pulses for one cycle. cancel returns the
// sequencer to idle at once (used when the parity check has already succeeded).
// Step order and operands follow the serial low-area schedule of the decoder description
// (FW1, FW2, MERGE2, BW1, BW2, MERGE1); the exact cycle split is this design's own.
// Memory map of the message memories: address j = Q of slot j, address 4+j = R of slot j.
module cnu_sched
  import nbldpc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  logic      cancel,
  output logic      busy,
  output logic      done,
  output cnu_ctrl_t ctrl
);

  typedef enum logic [2:0] {S_IDLE, S_PRE, S_LOAD, S_RUN, S_FIN} state_t;

  // Per step: source of L1 / L2 (mem or Lo), whether they are loaded, slot read, slot written
  typedef struct packed {
    logic       ld1;
    logic       src1_lo;
    logic       ld2;
    logic       src2_lo;
    logic [1:0] rd_slot;
    logic       wr;
    logic [1:0] wr_slot;
  } step_t;

  function automatic step_t step_of(logic [2:0] s);
    case (s)
      3'd0:    return '{ld1: 1'b1, src1_lo: 1'b0, ld2: 1'b0, src2_lo: 1'b0, rd_slot: 2'd1, wr: 1'b0, wr_slot: 2'd0}; // FW1  L1=Q2 (L2=Q1 pre-loaded)
      3'd1:    return '{ld1: 1'b1, src1_lo: 1'b1, ld2: 1'b1, src2_lo: 1'b0, rd_slot: 2'd2, wr: 1'b0, wr_slot: 2'd0}; // FW2  L1=F2 L2=Q3
      3'd2:    return '{ld1: 1'b0, src1_lo: 1'b0, ld2: 1'b1, src2_lo: 1'b0, rd_slot: 2'd3, wr: 1'b1, wr_slot: 2'd3}; // MERGE2 L2=Q4, write R4
      3'd3:    return '{ld1: 1'b1, src1_lo: 1'b0, ld2: 1'b0, src2_lo: 1'b0, rd_slot: 2'd2, wr: 1'b1, wr_slot: 2'd2}; // BW1  L1=Q3, write R3
      3'd4:    return '{ld1: 1'b1, src1_lo: 1'b1, ld2: 1'b1, src2_lo: 1'b0, rd_slot: 2'd1, wr: 1'b0, wr_slot: 2'd0}; // BW2  L1=B3 L2=Q2
      default: return '{ld1: 1'b0, src1_lo: 1'b0, ld2: 1'b1, src2_lo: 1'b0, rd_slot: 2'd0, wr: 1'b1, wr_slot: 2'd0}; // MERGE1 L2=Q1, write R1
    endcase
  endfunction

  state_t     state;
  logic [2:0] step;
  logic [3:0] cnt;
  step_t      st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      step  <= '0;
      cnt   <= '0;
    end else if (cancel) begin
      state <= S_IDLE;
    end else begin
      case (state)
        S_IDLE: if (start) state <= S_PRE;
        S_PRE: begin
          state <= S_LOAD;
          step  <= '0;
        end
        S_LOAD: begin
          state <= S_RUN;
          cnt   <= '0;
        end
        S_RUN: begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd15) begin
            if (step == 3'd5) state <= S_FIN;
            else begin
              state <= S_LOAD;
              step  <= step + 3'd1;
            end
          end
        end
        default: state <= S_IDLE;   // S_FIN
      endcase
    end
  end

  always_comb begin
    st   = step_of(step);
    ctrl = '0;
    case (state)
      S_PRE: begin
        ctrl.rd_addr = 3'd0;         // Q1 -> L2
        ctrl.load2   = 1'b1;
      end
      S_LOAD: begin
        ctrl.load1   = st.ld1;
        ctrl.sel1    = st.src1_lo;
        ctrl.load2   = st.ld2;
        ctrl.sel2    = st.src2_lo;
        ctrl.rd_addr = {1'b0, st.rd_slot};
        ctrl.wr_en   = st.wr;
        ctrl.wr_addr = {1'b1, st.wr_slot};
      end
      S_RUN: begin
        ctrl.shift = (cnt != 4'd15);
        ctrl.zero  = (cnt == 4'd15);
      end
      S_FIN: begin
        ctrl.wr_en   = 1'b1;
        ctrl.wr_addr = 3'd5;         // R2 (MERGE1 result)
      end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_FIN) && !cancel;

  // a pass is only started from idle
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE);

endmodule
