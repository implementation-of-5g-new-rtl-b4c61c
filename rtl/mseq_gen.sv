// mseq_gen: generator and coefficient register for one SSS m-sequence.
//
// A 7-bit linear feedback shift register runs the recursion
//   x(j+7) = (x(j+TAP) + x(j)) mod 2
// from the initial state [x(0) .. x(6)] = [1 0 0 0 0 0 0]; TAP = 4 gives the
// x0 sequence and TAP = 1 the x1 sequence of the SSS. After reset it produces
// one sequence bit per clock and shifts it into a 127-bit register, so that
// 127 clocks later seq[j] = x(j) for j = 0..126 and ready rises. The register
// then holds the whole period of the sequence, from which the correlator
// reads any cyclic shift in one clock. Recursions and initial state follow
// the SSS definition; filling a register once after reset is this
// implementation's choice.
module mseq_gen
  import sss_pkg::*;
#(
  parameter int TAP = X0_TAP
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic [SEQ_LEN-1:0] seq,
  output logic               ready
);
  logic [6:0] state;  // state[i] = x(j+i)
  logic [6:0] count;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= 7'b0000001;
      count <= '0;
      seq   <= '0;
      ready <= 1'b0;
    end else if (!ready) begin
      state <= {state[TAP] ^ state[0], state[6:1]};
      seq   <= {state[0], seq[SEQ_LEN-1:1]};
      if (count == 7'(SEQ_LEN - 1)) ready <= 1'b1;
      count <= count + 7'd1;
    end
  end

  initial begin
    assert (TAP > 0 && TAP < 7) else $error("mseq_gen: TAP out of range");
  end
endmodule
