// tb_dist_ram -- random writes and reads of a 32 x 80 instance against a shadow array;
// checks the asynchronous read and that a word being written still reads its old value.
module tb_dist_ram;
  logic        clk = 0, we = 0;
  logic [4:0]  waddr = '0, raddr = '0;
  logic [79:0] wdata = '0, rdata;
  logic [79:0] shadow [32];
  bit          valid [32];
  int          checks = 0, failures = 0;

  dist_ram #(.DEPTH(32), .WIDTH(80)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (valid[i]) valid[i] = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we = ($urandom_range(1) == 1);
      waddr = 5'($urandom_range(31));
      wdata = {$urandom, $urandom, 16'($urandom)};
      raddr = (t % 4 == 0) ? waddr : 5'($urandom_range(31));
      #1;
      if (valid[raddr]) begin
        checks++;
        if (rdata != shadow[raddr]) failures++;
      end
      @(posedge clk);
      if (we) begin shadow[waddr] = wdata; valid[waddr] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
