// seq6: processor-clock phase sequencer.
//
// Every emulated processor clock (pclock) lasts eight system clocks.  The
// sequencer is an 8-bit circular shift register that starts with its leftmost
// bit set and shifts right once per system clock, so exactly one bit is hot
// and one full rotation is one pclock.  `phase` is the register itself,
// `phase_idx` the position of the hot bit counted from the left (0..7, the
// T0..T7 of the cache controller flowcharts) and `pclk_start` is high in the
// first system clock of every pclock.
//
// The register length, the initial value and the right shift follow the
// first-level cache controller description.  Reset (synchronous, active
// high, reloading the initial value) and the two decoded outputs are this
// design's additions.
module seq6 #(
  parameter int unsigned STEPS = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  output logic [STEPS-1:0]         phase,
  output logic [$clog2(STEPS)-1:0] phase_idx,
  output logic                     pclk_start
);

  always_ff @(posedge clk) begin
    if (rst) phase <= {1'b1, {(STEPS-1){1'b0}}};
    else     phase <= {phase[0], phase[STEPS-1:1]};
  end

  always_comb begin
    phase_idx = '0;
    for (int i = 0; i < STEPS; i++)
      if (phase[STEPS-1-i]) phase_idx = ($clog2(STEPS))'(i);
  end

  assign pclk_start = phase[STEPS-1];

endmodule
