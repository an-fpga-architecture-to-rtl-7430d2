// Test of lsbwt_cu_array (N = 8): a string of random characters inserted
// with all CUs enabled must end sorted, with equal characters in arrival
// order, after every insertion; EQL/SUST after capture must mark the runs of
// equal characters; the sel_id and rd_id multiplexers must return the right
// ids; an insertion confined to an enable window must leave the other CUs
// unchanged and sort inside the window.
module tb_lsbwt_cu_array;
  localparam int N = 8;
  localparam int DW = 8;
  logic clk = 1'b0, clear, capture;
  logic [N-1:0] en, set_max, sel, eql, sust, less;
  logic [DW:0] data_in;
  logic [2:0] id_in, sel_id, rd_idx, rd_id;
  logic [DW:0] data [N];
  logic [2:0]  ids  [N];
  int checks = 0, failures = 0;
  int ref_d[$], ref_i[$];

  always #5 clk = ~clk;

  lsbwt_cu_array #(.N(N), .DATA_W(DW)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Stable insertion into the reference list.
  function automatic void ref_insert(input int d, input int id);
    int p = 0;
    while (p < ref_d.size() && ref_d[p] <= d) p++;
    ref_d.insert(p, d);
    ref_i.insert(p, id);
  endfunction

  task automatic compare_all(input string what);
    for (int i = 0; i < N; i++) begin
      int ed = (i < ref_d.size()) ? ref_d[i] : 256;
      chk(int'(data[i]) == ed, $sformatf("%s: data[%0d]=%0d expected %0d", what, i, data[i], ed));
      if (i < ref_d.size())
        chk(int'(ids[i]) == ref_i[i], $sformatf("%s: id[%0d]=%0d expected %0d", what, i, ids[i], ref_i[i]));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = '0; set_max = '0; capture = 0; sel = '0; rd_idx = '0; data_in = '0; id_in = '0;
    for (int rep = 0; rep < 5; rep++) begin
      clear = 1; @(posedge clk); #1 clear = 0;
      ref_d.delete(); ref_i.delete();
      for (int k = 0; k < N; k++) begin
        int d;
        d = 65 + $urandom % 3;
        data_in = 9'(d); id_in = 3'(k); en = '1;
        ref_insert(d, k);
        @(posedge clk); #1;
        en = '0;
        compare_all($sformatf("rep %0d after %0d", rep, k));
      end
      capture = 1; @(posedge clk); #1 capture = 0;
      for (int i = 0; i < N; i++) begin
        bit el, er;
        el = (i > 0) && ref_d[i] == ref_d[i - 1];
        er = (i < N - 1) && ref_d[i] == ref_d[i + 1];
        chk(eql[i] == el, $sformatf("EQL[%0d]", i));
        chk(sust[i] == (el || er), $sformatf("SUST[%0d]", i));
        sel = N'(1) << i; rd_idx = 3'(i); #1;
        chk(int'(sel_id) == ref_i[i], $sformatf("sel_id %0d", i));
        chk(int'(rd_id) == ref_i[i], $sformatf("rd_id %0d", i));
      end
      sel = '0;
    end
    // windowed insertion over CUs 5..7 after a MAX_VALUE load there
    set_max = 8'hE0; @(posedge clk); #1 set_max = '0;
    for (int k = 0; k < 3; k++) begin
      int d;
      d = 10 - 3 * k;
      ref_d[5 + k] = 256;
      data_in = 9'(d); id_in = ids[5 + k];
      en = (8'hE0 >> (2 - k)) & 8'hE0;
      begin
        // reference: sort the filled part of the window
        int w[$], wi[$];
        w.delete(); wi.delete();
        for (int j = 5; j < 5 + k; j++) begin w.push_back(ref_d[j]); wi.push_back(ref_i[j]); end
        ref_d = ref_d[0:4]; ref_i = ref_i[0:4];
        begin
          int p;
          p = 0;
          while (p < w.size() && w[p] <= d) p++;
          w.insert(p, d); wi.insert(p, int'(id_in));
        end
        foreach (w[j]) begin ref_d.push_back(w[j]); ref_i.push_back(wi[j]); end
      end
      @(posedge clk); #1 en = '0;
      compare_all($sformatf("window step %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
