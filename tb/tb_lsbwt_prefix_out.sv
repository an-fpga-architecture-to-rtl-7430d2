// Test of lsbwt_prefix_out (N = 128): prefix = (id-1) mod N for every id,
// primary only on id 0 while valid, and primary_idx latching that row.
module tb_lsbwt_prefix_out;
  localparam int N = 128;
  logic clk = 1'b0, clear;
  logic valid;
  logic [6:0] row, id, prefix, primary_idx;
  logic primary;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lsbwt_prefix_out #(.N(N)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm[N];
    foreach (perm[i]) perm[i] = (i * 37 + 11) % N;   // 37 is odd: a permutation
    clear = 1'b1; valid = 1'b0; row = '0; id = '0;
    @(posedge clk); #1 clear = 1'b0;
    for (int r = 0; r < N; r++) begin
      valid = 1'b1; row = 7'(r); id = 7'(perm[r]);
      #1;
      chk(int'(prefix) == (perm[r] + N - 1) % N, $sformatf("prefix of %0d", perm[r]));
      chk(primary == (perm[r] == 0), $sformatf("primary at row %0d", r));
      @(posedge clk); #1;
    end
    valid = 1'b0; id = '0; #1;
    chk(!primary, "primary needs valid");
    @(posedge clk); #1;
    begin
      int exp_row = 0;
      foreach (perm[i]) if (perm[i] == 0) exp_row = i;
      chk(int'(primary_idx) == exp_row, $sformatf("primary_idx %0d expected %0d", primary_idx, exp_row));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
