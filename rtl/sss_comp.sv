// sss_comp: the SSS comparator.
//
// Receives the full correlation of each SSS hypothesis as a stream
// (in_valid, value, index) and keeps the largest value and the index it came
// with; the index of the winner is the detected cell ID group N_ID1. A
// strictly larger value replaces the stored one, so on a tie the first
// hypothesis wins. clear empties the comparator before a new search; the
// first value after clear is always taken.
// Timing: best_value/best_index reflect all inputs up to the previous clock.
module sss_comp #(
  parameter int VW = 20,
  parameter int IW = 9
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  in_valid,
  input  logic signed [VW-1:0]  value,
  input  logic [IW-1:0]         index,
  output logic signed [VW-1:0]  best_value,
  output logic [IW-1:0]         best_index,
  output logic                  updated
);
  logic have;

  assign updated = in_valid && (!have || value > best_value);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      have       <= 1'b0;
      best_value <= '0;
      best_index <= '0;
    end else if (updated) begin
      have       <= 1'b1;
      best_value <= value;
      best_index <= index;
    end
  end
endmodule
