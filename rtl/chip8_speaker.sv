// chip8_speaker: the beep of the CHIP-8 sound timer.
//
// While the sound timer is above zero the block plays one fixed tone, a
// triangle wave of TONE_HZ; otherwise it outputs silence (sample 0). A
// 32-bit phase accumulator advances by TONE_HZ * 2^32 / CLK_HZ every clock.
// The triangle is the phase folded at its midpoint: the SAMPLE_W bits
// below the top phase bit rise during the first half of each period and are inverted during
// the second half, then re-centred around zero as a signed sample. The
// phase restarts from zero whenever the tone is off, so every beep starts
// at the bottom of the wave.
//
// Timing: sample and active are registered; they follow the sound input
// one clock later. The samples are meant for an audio codec.
//
// The triangle wave and "a single monotone beep while the sound timer is
// above 0" are the document's; the pitch, sample width and accumulator are
// this design's choices.
module chip8_speaker #(
  parameter int CLK_HZ   = 50_000_000,
  parameter int TONE_HZ  = 440,
  parameter int SAMPLE_W = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [7:0]                 sound,
  output logic signed [SAMPLE_W-1:0] sample,
  output logic                       active
);
  localparam logic [63:0] STEP64 = (64'(TONE_HZ) << 32) / 64'(CLK_HZ);
  localparam logic [31:0] STEP   = STEP64[31:0];

  logic [31:0]         phase;
  logic [SAMPLE_W-1:0] fold;

  // rising in the first half period, falling in the second
  assign fold = phase[31] ? ~phase[30 -: SAMPLE_W] : phase[30 -: SAMPLE_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= '0;
      sample <= '0;
      active <= 1'b0;
    end else begin
      active <= (sound != 8'd0);
      if (sound != 8'd0) begin
        phase  <= phase + STEP;
        sample <= $signed(fold ^ {1'b1, {(SAMPLE_W-1){1'b0}}});
      end else begin
        phase  <= '0;
        sample <= '0;
      end
    end
  end

endmodule
