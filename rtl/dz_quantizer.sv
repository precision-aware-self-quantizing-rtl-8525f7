// dz_quantizer: uniform dead-zone quantizer with a power-of-two step.
//
// Self-quantization: a final wavelet coefficient is written out as its
// quantization index q = sign(y) * floor(|y| / step), i.e. rounded toward
// zero, which gives the dead zone of twice the bin width around zero. The
// step is specified for the first (highest-resolution) level and halves with
// every further level, so for level L the shift is
//   shift = step_shift - (L - 1), clamped at 0,
// counted in LSBs of the data format. Because the step is a power of two the
// division is a shift of the magnitude. With quant = 0 the value passes
// unchanged (intermediate data that is transformed again). Purely
// combinational.
module dz_quantizer #(
  parameter int W  = dwt_pkg::DATA_W,
  parameter int SW = 5,              // width of the step exponent
  parameter int LW = 3               // width of the level number
) (
  input  logic                 quant,       // 1: final coefficient
  input  logic [SW-1:0]        step_shift,  // log2(step) at level 1, in LSBs
  input  logic [LW-1:0]        level,       // 1 = first level
  input  logic signed [W-1:0]  y,
  output logic signed [W-1:0]  q
);

  logic [W-1:0]  mag, mag_sh;
  logic [SW:0]   sh;

  always_comb begin
    if ({1'b0, step_shift} + 1 > (SW+1)'(level))
      sh = {1'b0, step_shift} + 1 - (SW+1)'(level);
    else
      sh = '0;
    mag    = y[W-1] ? W'(-y) : W'(y);
    mag_sh = mag >> sh;
    if (!quant)
      q = y;
    else
      q = y[W-1] ? -$signed(mag_sh) : $signed(mag_sh);
  end

endmodule
