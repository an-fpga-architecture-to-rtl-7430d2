// Test of lsbwt_enable_mux (N = 16): all enables during load, one-hot at a
// group start, the running OR of one-hot words inside a group, restart at
// the next group start, and zero enables in other cycles.
module tb_lsbwt_enable_mux;
  localparam int N = 16;
  logic clk = 1'b0, clear, load_all, subst, eql_sel;
  logic [N-1:0] onehot, en;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lsbwt_enable_mux #(.N(N)) dut (.*);

  task automatic cyc_expect(input bit la, input bit su, input int pos, input bit eq,
                            input logic [N-1:0] e);
    @(negedge clk);
    load_all = la; subst = su; eql_sel = eq;
    onehot = (pos >= 0) ? (N'(1) << pos) : '0;
    #1;
    checks++;
    if (en !== e) begin
      failures++;
      $display("FAIL: la=%0b su=%0b pos=%0d eql=%0b en=%h expected %h", la, su, pos, eq, en, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1'b1; load_all = 0; subst = 0; eql_sel = 0; onehot = '0;
    @(posedge clk); #1 clear = 1'b0;
    cyc_expect(1, 0, -1, 0, '1);
    cyc_expect(0, 0, -1, 0, '0);
    // group at CUs 2..5
    cyc_expect(0, 1, 2, 0, 16'h0004);
    cyc_expect(0, 1, 3, 1, 16'h000C);
    cyc_expect(0, 1, 4, 1, 16'h001C);
    cyc_expect(0, 1, 5, 1, 16'h003C);
    // adjacent group at CUs 6..7 starts afresh
    cyc_expect(0, 1, 6, 0, 16'h0040);
    cyc_expect(0, 1, 7, 1, 16'h00C0);
    // group at CUs 12..13
    cyc_expect(0, 1, 12, 0, 16'h1000);
    cyc_expect(0, 1, 13, 1, 16'h3000);
    cyc_expect(0, 0, -1, 0, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
