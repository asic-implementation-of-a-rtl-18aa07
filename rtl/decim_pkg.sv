// decim_pkg: constants and types shared by the reconfigurable decimation filter.
//
// The filter is a chain of 2-fold decimators; the select line picks how many of
// them are in use, so the decimation factor is a power of two from 2 up to 16.
// The default sizes here are the ones the top module uses: a 10-bit signed
// input, four stages, and therefore a 14-bit output (each stage adds one bit
// so no arithmetic result is ever truncated). The 14-bit output resolution and
// the maximum factor of 16 are the design's targets; the 10-bit input width is
// this design's choice, the one that gives 14 bits after four exact stages.
package decim_pkg;

  localparam int unsigned DEF_IN_W     = 10;
  localparam int unsigned DEF_N_STAGES = 4;
  localparam int unsigned DEF_SEL_W    = $clog2(DEF_N_STAGES);

  // Select-line encoding for the default four-stage chain: the value is the
  // index of the last stage in use, so the factor is 2^(sel+1).
  typedef enum logic [DEF_SEL_W-1:0] {
    DEC_BY_2  = 2'd0,
    DEC_BY_4  = 2'd1,
    DEC_BY_8  = 2'd2,
    DEC_BY_16 = 2'd3
  } dec_sel_e;

endpackage
