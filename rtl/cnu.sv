// cnu -- low-area check node unit (one min-max elementary unit), dedicated to row ROW of H.
//
// Runs the forward-backward Min-Max check node update for a degree-4 check node as six serial
// min-max steps (schedule in cnu_sched):
//   FW1: F2 = Q1 (+) Q2       FW2: R4 = F2 (+) Q3      MERGE2: R3 = F2 (+) Q4
//   BW1: B3 = Q3 (+) Q4       BW2: R1 = B3 (+) Q2      MERGE1: R2 = B3 (+) Q1
// where (+) is the min-max step. F2 and B3 are never stored: each is used by the two steps
// right after it while it still sits in the min-max unit or its output register.
//
// H coefficients: a message Q about symbol a is turned into a message about h*a by a rotation
// of its power-representation vector (rot_mul), and each result is rotated back (rot_div).
// Because this CNU serves one row only, the four rotations are fixed wiring selected by the
// slot field of the memory address; there are no field multipliers or barrel shifters.
//
// Interface: ctrl (from cnu_sched, shared by all CNUs) drives the memory address, the input
// multiplexers and the min-max unit. mem_rd_data is the message memory word at ctrl.rd_addr
// (asynchronous read). r_out is the R message for the slot in ctrl.wr_addr, to be written
// when ctrl.wr_en is high. The schedule follows the decoder description; the use of the
// memory address to select the hard-wired rotation is this design's own.
module cnu
  import nbldpc_pkg::*;
#(
  parameter int unsigned ROW = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  cnu_ctrl_t ctrl,
  input  vec_t      mem_rd_data,
  output vec_t      r_out
);

  typedef int unsigned exp_tab_t [DC];
  function automatic exp_tab_t make_exp();
    exp_tab_t t;
    for (int unsigned j = 0; j < DC; j++) t[j] = row_exp_f(ROW, j);
    return t;
  endfunction
  localparam exp_tab_t HEXP = make_exp();   // exponents of the H entries of this row

  vec_t q_rot [DC];     // input message of each slot, multiplied by its H coefficient
  vec_t r_rot [DC];     // output message of each slot, divided by its H coefficient
  vec_t lo, q_in, l1_in, l2_in;

  always_comb begin
    for (int unsigned j = 0; j < DC; j++) begin
      q_rot[j] = rot_mul(mem_rd_data, HEXP[j]);
      r_rot[j] = rot_div(lo, HEXP[j]);
    end
    q_in  = q_rot[ctrl.rd_addr[1:0]];
    l1_in = ctrl.sel1 ? lo : q_in;
    l2_in = ctrl.sel2 ? lo : q_in;
    r_out = r_rot[ctrl.wr_addr[1:0]];
  end

  minmax_unit u_mm (
    .clk   (clk),
    .rst_n (rst_n),
    .load1 (ctrl.load1),
    .load2 (ctrl.load2),
    .l1_in (l1_in),
    .l2_in (l2_in),
    .shift (ctrl.shift),
    .zero  (ctrl.zero),
    .lo    (lo)
  );

endmodule
