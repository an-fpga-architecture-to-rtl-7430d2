// Test of lsbwt_str_mem (N = 128, 8-bit): writes a random string, then
// reads both ports at random addresses against a copy kept here, and checks
// that a cycle without write enable changes nothing.
module tb_lsbwt_str_mem;
  localparam int N = 128;
  logic clk = 1'b0;
  logic we;
  logic [6:0] waddr, raddr_a, raddr_b;
  logic [7:0] wdata, rdata_a, rdata_b;
  byte unsigned ref_s [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lsbwt_str_mem #(.N(N), .DATA_W(8)) dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; raddr_a = '0; raddr_b = '0;
    for (int i = 0; i < N; i++) begin
      ref_s[i] = byte'($urandom);
      @(negedge clk);
      we = 1'b1; waddr = 7'(i); wdata = ref_s[i];
    end
    @(negedge clk);
    we = 1'b0; waddr = 7'd5; wdata = ~ref_s[5];
    @(negedge clk);
    for (int t = 0; t < 400; t++) begin
      raddr_a = 7'($urandom); raddr_b = 7'($urandom);
      #1;
      checks += 2;
      if (rdata_a != ref_s[raddr_a]) begin failures++; $display("FAIL: port a @%0d", raddr_a); end
      if (rdata_b != ref_s[raddr_b]) begin failures++; $display("FAIL: port b @%0d", raddr_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
