// Test of lsbwt_prio_enc (N = 128): random request words with a few set
// bits, single bits at every position and the all-zero word, compared with
// a first-set-bit search done here.
module tb_lsbwt_prio_enc;
  localparam int N = 128;
  logic [N-1:0] req;
  logic [6:0]   idx;
  logic         valid;
  int checks = 0, failures = 0;

  lsbwt_prio_enc #(.N(N)) dut (.req, .idx, .valid);

  task automatic expect_first(input logic [N-1:0] r);
    int e = -1;
    for (int i = 0; i < N; i++) if (r[i] && e < 0) e = i;
    req = r;
    #1;
    checks++;
    if (valid != (e >= 0) || (e >= 0 && int'(idx) != e)) begin
      failures++;
      $display("FAIL: req=%h idx=%0d valid=%0b expected %0d", r, idx, valid, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_first('0);
    for (int i = 0; i < N; i++) expect_first(N'(1) << i);
    for (int t = 0; t < 300; t++) begin
      logic [N-1:0] r;
      int nb;
      r = '0;
      nb = $urandom_range(1, 6);
      for (int b = 0; b < nb; b++) r[$urandom % N] = 1'b1;
      expect_first(r);
    end
    expect_first('1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
