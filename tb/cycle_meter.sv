// cycle_meter: testbench helper that measures the period of a sequence of
// states with Brent's method, one state per clock, without storing the
// sequence. It keeps one saved state; every time the number of steps since
// the last save reaches the current power of two, it saves the present state
// and doubles the power. When the present state equals the saved one, the
// distance since the save is the cycle length. `found` then stays high and
// `cycle_len` holds the length.
module cycle_meter #(
  parameter int W = 49
) (
  input  logic         clk,
  input  logic         start,     // restart the measurement with this state
  input  logic         step,      // a new state is present
  input  logic [W-1:0] st,
  output logic         found,
  output longint       cycle_len,
  output longint       steps
);
  logic [W-1:0] saved;
  longint power, lam;

  always_ff @(posedge clk) begin
    if (start) begin
      saved <= st; power <= 1; lam <= 0; found <= 1'b0; cycle_len <= 0; steps <= 0;
    end else if (step && !found) begin
      steps <= steps + 1;
      if (st == saved) begin
        found     <= 1'b1;
        cycle_len <= lam + 1;
      end else if (lam + 1 == power) begin
        saved <= st; power <= power * 2; lam <= 0;
      end else begin
        lam <= lam + 1;
      end
    end
  end
endmodule
