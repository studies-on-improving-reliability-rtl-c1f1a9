// razor_ff: Razor pipeline register (main flip-flop plus shadow element).
//
// The main flip-flop samples d at the clock edge. A shadow element, clocked a
// fraction of a cycle later, samples the same d after it has settled. When
// the combinational path feeding d is too slow for the current supply voltage,
// the main flip-flop holds a stale value while the shadow holds the correct
// one; the two then differ and err is raised for that cycle.
//
// Modelling: the delayed shadow clock is not a separate port here. The input
// late says, for the capture in this cycle, that d settled after the main edge
// but before the shadow edge; the main flip-flop then keeps its previous
// contents (the data it would have caught had not yet arrived) and the shadow
// takes d. In silicon late is not a signal but the physical path delay; it
// lets the same RTL stand for the register and for its timing failure. If the
// stale value happens to equal d no error is seen, as in a real Razor FF.
//
// Timing: q, shadow_q and err are valid in the cycle after the capture edge.
// err is only raised in a cycle that follows a capture (en = 1).
// The main/shadow structure follows the document; the stale-value model of a
// setup violation is this design's choice.
module razor_ff #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  input  logic             late,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] shadow_q,
  output logic             err
);

  logic checked;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q        <= '0;
      shadow_q <= '0;
      checked  <= 1'b0;
    end else begin
      checked <= en;
      if (en) begin
        if (!late) q <= d;
        shadow_q <= d;
      end
    end
  end

  assign err = checked && (q != shadow_q);

endmodule
