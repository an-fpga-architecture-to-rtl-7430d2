// Enable multiplexer for the CUs.
//
// Three cases select the enables, as in the architecture description:
//   load_all           first sort: every CU is enabled (the string is fed);
//   subst, eql_sel = 0 the selected CU starts a group: only it is enabled,
//                      en = onehot;
//   subst, eql_sel = 1 the selected CU continues a group: the enables are
//                      the OR of all one-hot words since the group began,
//                      en = acc | onehot.
// acc holds the OR of the enables of the previous substitution cycle. In any
// other cycle all enables are low, so the CUs hold their contents. The enable
// word is combinational; acc is updated on the clock edge and cleared by
// clear. Keeping the running OR in a register here is this design's choice.
module lsbwt_enable_mux #(
  parameter int unsigned N = lsbwt_pkg::DEF_N
) (
  input  logic         clk,
  input  logic         clear,
  input  logic         load_all,   // first sort, a character is fed
  input  logic         subst,      // a substitution cycle
  input  logic [N-1:0] onehot,     // one-hot decoder output
  input  logic         eql_sel,    // stored EQL of the selected CU
  output logic [N-1:0] en
);

  logic [N-1:0] acc;

  always_comb begin
    if (load_all)
      en = '1;
    else if (subst)
      en = eql_sel ? (acc | onehot) : onehot;
    else
      en = '0;
  end

  always_ff @(posedge clk) begin
    if (clear)
      acc <= '0;
    else if (subst)
      acc <= en;
  end

endmodule
