// psd_pkg: constants and stream types shared by the Welch power-spectrum core.
//
// The numbers follow the configuration the design is built around: four input
// channels of 18-bit samples, 1024-sample frames (so 512 spectrum bins from DC
// up to just below Nyquist), 18-bit FFT input and twiddle factors. The
// accumulator and bus widths are this design's own choice.
package psd_pkg;
  localparam int unsigned N_CH      = 4;     // input channels
  localparam int unsigned N_FFT     = 1024;  // frame length / FFT points
  localparam int unsigned SAMPLE_W  = 18;    // ADC sample width
  localparam int unsigned TWIDDLE_W = 18;    // FFT twiddle width
  localparam int unsigned COEF_W    = 18;    // window coefficient width (unsigned, 1.17)
  localparam int unsigned POWER_W   = 36;    // |X|^2 of 18-bit complex value
  localparam int unsigned ACC_W     = 48;    // accumulated power
  localparam int unsigned NAVG_W    = 16;    // width of the averaging count n
  localparam int unsigned BUS_AW    = 14;    // host register bus word address
  localparam int unsigned BUS_DW    = 32;    // host register bus data

  // Host register map (word addresses).
  localparam logic [BUS_AW-1:0] REG_CTRL    = 14'h0000; // [0] enable sampling
  localparam logic [BUS_AW-1:0] REG_NAVG    = 14'h0001; // spectra per average (n)
  localparam logic [BUS_AW-1:0] REG_STATUS  = 14'h0002; // ring fill / overflow count
  localparam logic [BUS_AW-1:0] REG_HEAD    = 14'h0003; // [31] valid, [7:0] channel of oldest spectrum
  localparam logic [BUS_AW-1:0] REG_POP     = 14'h0004; // write: release oldest spectrum
  localparam logic [BUS_AW-1:0] REG_DROPS   = 14'h0005; // frames dropped by the input buffers
  localparam logic [1:0]        PAGE_SPEC   = 2'b01;    // 0x1000 + 2*bin + {0:low,1:high word}
  localparam logic [1:0]        PAGE_WINDOW = 2'b10;    // 0x2000 + n : window coefficient n
endpackage
