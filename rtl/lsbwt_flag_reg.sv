// Flag register: stores the EQL and SUST flags of all CUs on each round-end
// capture pulse. During substitution the controller clears, each cycle, the
// SUST bit of the CU being substituted (clr_mask is the one-hot word).
// sust_any tells whether any stored SUST bit is set (used in the decide
// cycle: none set means the BWT is complete); sust_last tells that the
// current substitution clears the last set bit, which ends the iteration.
// Storing the flags follows the architecture's computation steps; the bit
// clearing is how this design walks the priority encoder over the groups.
module lsbwt_flag_reg #(
  parameter int unsigned N = lsbwt_pkg::DEF_N
) (
  input  logic         clk,
  input  logic         clear,
  input  logic         capture,
  input  logic [N-1:0] eql_in,
  input  logic [N-1:0] sust_in,
  input  logic         clr_en,
  input  logic [N-1:0] clr_mask,
  output logic [N-1:0] eql_q,
  output logic [N-1:0] sust_q,
  output logic         sust_any,
  output logic         sust_last
);

  assign sust_any  = |sust_q;
  assign sust_last = clr_en && ((sust_q & ~clr_mask) == '0);

  always_ff @(posedge clk) begin
    if (clear) begin
      eql_q  <= '0;
      sust_q <= '0;
    end else if (capture) begin
      eql_q  <= eql_in;
      sust_q <= sust_in;
    end else if (clr_en) begin
      sust_q <= sust_q & ~clr_mask;
    end
  end

endmodule
