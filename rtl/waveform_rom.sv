`timescale 1ns / 1ps
// waveform_rom: sine waveform memory of a DDS unit.
//
// The memory holds one half period of |sin| in 2^ROM_AW words of DW-1 bits;
// the phase MSB PA_15 supplies the sign, so the output is a full sine wave
// in DW-bit two's complement:
//   sample = (PA_15 ? -1 : +1) * round((2^(DW-1)-1) * sin(pi*(a+0.5)/2^ROM_AW)),
//   a = PA[N-2 -: ROM_AW]   (the top ROM_AW bits of the half-period phase).
// The half-sample offset keeps the table symmetric and never addresses the
// zero crossing exactly, so +x and -x stay balanced. The phase bits below
// the address (PA[N-2-ROM_AW:0]) are truncated and left unused, which bounds
// the amplitude error to about 3 LSB for the default sizes. The table is computed
// at elaboration from that formula. The read is asynchronous: the memory is
// small and the DDS clock (the comparator output) is slow.
// The memory geometry is this design's choice; the original design only
// states that the memory contains samples of the waveform.
module waveform_rom #(
  parameter int unsigned N      = dds_pkg::PHASE_W,
  parameter int unsigned ROM_AW = dds_pkg::ROM_AW,
  parameter int unsigned DW     = dds_pkg::SAMPLE_W
) (
  input  logic                 pa_15,
  input  logic [N-2:0]         pa,
  output logic signed [DW-1:0] sample
);
  localparam int unsigned DEPTH = 1 << ROM_AW;
  typedef logic [DW-2:0] mag_t;
  typedef mag_t table_t [DEPTH];

  function automatic table_t make_table();
    table_t t;
    real amp;
    amp = real'((1 << (DW - 1)) - 1);
    for (int i = 0; i < int'(DEPTH); i++)
      t[i] = mag_t'(int'($floor(amp * $sin(3.14159265358979324 * (real'(i) + 0.5)
                                           / real'(DEPTH)) + 0.5)));
    return t;
  endfunction

  localparam table_t HALF_SINE = make_table();

  logic [ROM_AW-1:0] addr;
  logic signed [DW-1:0] mag;

  always_comb begin
    addr   = pa[N-2 -: ROM_AW];
    mag    = signed'({1'b0, HALF_SINE[addr]});
    sample = pa_15 ? -mag : mag;
  end
endmodule
