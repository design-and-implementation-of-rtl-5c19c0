// soft_demod: 3-bit, 8-level soft-decision quantiser for one received sample.
//
// The sample is a two's-complement value of SAMPLE_W bits from an antipodal
// (BPSK-like) demodulator: a transmitted 1 is nominally +2**(SAMPLE_W-2) and a
// transmitted 0 nominally -2**(SAMPLE_W-2). The range between the two nominal
// points is cut into eight equal zones of 2**(SAMPLE_W-4), giving the
// document's levels 0 ("most confident 0") to 7 ("most confident 1"), with
// samples beyond either nominal point clamped to 0 or 7. The eight levels and
// their meaning follow the document; the sample format, mapping polarity and
// zone width are this design's choices. Purely combinational.
module soft_demod
  import viterbi_pkg::*;
#(
  parameter int unsigned SAMPLE_W = 8
) (
  input  logic signed [SAMPLE_W-1:0] sample,
  output soft_t                      level
);

  localparam int unsigned SHIFT = SAMPLE_W - 4;

  logic signed [SAMPLE_W-1:0] zone;   // zone index relative to the threshold at 0

  always_comb begin
    zone = sample >>> SHIFT;          // floor(sample / zone width), -8..7
    if (zone < -4)
      level = '0;
    else if (zone > 3)
      level = SOFT_MAX;
    else
      level = SOFT_W'(zone + 4);
  end

endmodule
