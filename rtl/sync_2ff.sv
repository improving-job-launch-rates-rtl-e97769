// sync_2ff: two-flip-flop synchroniser for a W-bit bus entering the clock
// domain of `clk`. It is only safe for buses where at most one bit changes at
// a time (Gray-coded pointers) or for single-bit levels. Output is two `clk`
// edges behind the input. Reset value is RESET_VAL.
module sync_2ff #(
  parameter int unsigned W         = 1,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
