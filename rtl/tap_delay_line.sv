// tap_delay_line - shift register that exposes a signal's recent history.
//
// taps[0] is the current input din (a wire, no register); taps[k] for
// k = 1..TAPS-1 is the sample that was on din k strobes ago. On each clock
// with en high the chain shifts by one place. A synchronous active-low reset
// clears the stored samples to zero. TAPS-1 registers of W bits are used,
// which is what makes the filter's shift-register cost one register per
// delayed tap. The register chain is the shift register of the direct-form
// filter; passing the current sample through as tap 0 and the reset value
// are this design's choices.
module tap_delay_line #(
  parameter int unsigned W    = iir_pkg::DATA_W,
  parameter int unsigned TAPS = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] taps [TAPS]
);
  assign taps[0] = din;

  if (TAPS > 1) begin : g_chain
    logic signed [W-1:0] dly [TAPS-1];

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int k = 0; k < TAPS - 1; k++) dly[k] <= '0;
      end else if (en) begin
        dly[0] <= din;
        for (int k = 1; k < TAPS - 1; k++) dly[k] <= dly[k-1];
      end
    end

    for (genvar k = 1; k < TAPS; k++) begin : g_tap
      assign taps[k] = dly[k-1];
    end
  end
endmodule
