// Round end: signals the end of each sorting iteration.
//
// first_done is set in the cycle after the last character of the first sort
// has been inserted and stays set until clear. pulse is high for one cycle
// after the last insertion of any iteration (last_load for the first sort,
// last_subst for the later ones); it is the moment EQL and SUST are stored.
// round_done is that pulse, held high from the cycle after bwt_done until
// clear, so it "stays set" once the transform is complete. All outputs are
// registered. Timing of the pulse is this design's; the three behaviours are
// those of the architecture's round-end block.
module lsbwt_round_end (
  input  logic clk,
  input  logic clear,
  input  logic last_load,
  input  logic last_subst,
  input  logic bwt_done,
  output logic first_done,
  output logic pulse,
  output logic round_done
);

  logic done_q;

  assign round_done = pulse || done_q;

  always_ff @(posedge clk) begin
    if (clear) begin
      first_done <= 1'b0;
      pulse      <= 1'b0;
      done_q     <= 1'b0;
    end else begin
      pulse <= last_load || last_subst;
      if (last_load) first_done <= 1'b1;
      if (bwt_done)  done_q     <= 1'b1;
    end
  end

endmodule
