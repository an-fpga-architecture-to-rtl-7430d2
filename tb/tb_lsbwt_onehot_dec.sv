// Test of lsbwt_onehot_dec (N = 128): every index with valid high gives a
// word with exactly that bit set; valid low gives zero.
module tb_lsbwt_onehot_dec;
  localparam int N = 128;
  logic [6:0]   idx;
  logic         valid;
  logic [N-1:0] onehot;
  int checks = 0, failures = 0;

  lsbwt_onehot_dec #(.N(N)) dut (.idx, .valid, .onehot);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      for (int v = 0; v < 2; v++) begin
        logic [N-1:0] e;
        idx = 7'(i);
        valid = v[0];
        e = v ? (N'(1) << i) : '0;
        #1;
        checks++;
        if (onehot !== e) begin
          failures++;
          $display("FAIL: idx=%0d valid=%0d onehot=%h", i, v, onehot);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
