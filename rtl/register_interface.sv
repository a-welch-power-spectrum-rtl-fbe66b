// register_interface: the host side of the core: a circular buffer of
// averaged spectra, a done flag, and the control/status registers.
//
// Averaged spectra from the accumulator are stored whole in a circular buffer
// of SLOTS spectra (N_FFT/2 words of ACC_W bits each) together with their
// channel number. When a spectrum has been stored completely, `done` is high
// for one clock to tell the host that a new spectrum can be fetched. The
// host reads the oldest stored spectrum through a window in the register map
// and then releases it by writing REG_POP. When all slots are full, an
// arriving spectrum is discarded as a whole and counted in the overflow
// field. The circular buffer and the one-cycle done flag follow the design;
// the slot count, the full-buffer policy and the register map (psd_pkg) are
// this implementation's.
//
// Register bus: a simple synchronous word bus (32-bit data; writes use only
// the low bits each register needs, so the upper write-data bits are unused). A write takes effect at the
// clock edge where `bus_wr` is high; `bus_rdata` shows, one clock later,
// the word addressed in the previous clock.
//   REG_CTRL   [0] enable sampling              (rw, reset 0)
//   REG_NAVG   spectra per average n            (rw, reset NAVG_RESET)
//   REG_STATUS [7:0] stored spectra, [31:16] overflow count (ro)
//   REG_HEAD   [31] a spectrum is stored, [7:0] its channel (ro)
//   REG_POP    write: release the oldest spectrum
//   REG_DROPS  frames discarded by the input buffers (ro)
//   0x1000 + 2*bin + h : oldest spectrum, bin `bin`, h=0 low 32 bits, h=1 high
//   0x2000 + n         : window coefficient n (rw)
module register_interface #(
  parameter int unsigned N_CH       = psd_pkg::N_CH,
  parameter int unsigned N_FFT      = psd_pkg::N_FFT,
  parameter int unsigned ACC_W      = psd_pkg::ACC_W,
  parameter int unsigned NAVG_W     = psd_pkg::NAVG_W,
  parameter int unsigned COEF_W     = psd_pkg::COEF_W,
  parameter int unsigned SLOTS      = 4,
  parameter int unsigned NAVG_RESET = 10
) (
  input  logic                        clk,
  input  logic                        rst,
  // spectra from the accumulator
  input  logic                        in_valid,
  input  logic [ACC_W-1:0]            in_sum,
  input  logic [$clog2(N_FFT)-2:0]    in_bin,
  input  logic [$clog2(N_CH)-1:0]     in_ch,
  input  logic                        in_last,
  output logic                        done,
  // host bus
  input  logic [psd_pkg::BUS_AW-1:0]  bus_addr,
  input  logic                        bus_wr,
  input  logic [psd_pkg::BUS_DW-1:0]  bus_wdata,
  output logic [psd_pkg::BUS_DW-1:0]  bus_rdata,
  // control and status of the core
  output logic                        enable,
  output logic [NAVG_W-1:0]           n_avg,
  input  logic [31:0]                 drops,
  output logic                        coef_we,
  output logic [$clog2(N_FFT)-1:0]    coef_addr,
  output logic [COEF_W-1:0]           coef_wdata,
  input  logic [COEF_W-1:0]           coef_rdata
);
  import psd_pkg::*;
  localparam int unsigned BW = $clog2(N_FFT) - 1;
  localparam int unsigned SW = (SLOTS > 1) ? $clog2(SLOTS) : 1;
  localparam int unsigned CW = $clog2(N_CH);

  logic [ACC_W-1:0] buffer [SLOTS * N_FFT / 2];
  logic [CW-1:0]    slot_ch [SLOTS];
  logic [SW-1:0]    wr_slot, rd_slot;
  logic [SW:0]      stored;
  logic             discarding;   // current incoming spectrum is being dropped
  logic [15:0]      overflows;
  logic             commit, pop;

  wire first_beat = in_valid && (in_bin == '0);
  wire full       = (stored == (SW+1)'(SLOTS));
  wire accept     = in_valid && !(first_beat ? full : discarding);

  assign commit = accept && in_last;
  assign pop    = bus_wr && (bus_addr == REG_POP) && (stored != '0);

  always_ff @(posedge clk) begin
    if (accept) buffer[{wr_slot, in_bin}] <= in_sum;
    if (accept && first_beat) slot_ch[wr_slot] <= in_ch;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_slot    <= '0;
      rd_slot    <= '0;
      stored     <= '0;
      discarding <= 1'b0;
      overflows  <= '0;
      done       <= 1'b0;
      enable     <= 1'b0;
      n_avg      <= NAVG_W'(NAVG_RESET);
    end else begin
      done <= commit;
      if (first_beat) begin
        discarding <= full;
        if (full) overflows <= overflows + 16'd1;
      end
      if (commit) wr_slot <= SW'((32'(wr_slot) + 1) % SLOTS);
      if (pop)    rd_slot <= SW'((32'(rd_slot) + 1) % SLOTS);
      stored <= stored + (SW+1)'(commit) - (SW+1)'(pop);
      if (bus_wr && bus_addr == REG_CTRL) enable <= bus_wdata[0];
      if (bus_wr && bus_addr == REG_NAVG) n_avg  <= bus_wdata[NAVG_W-1:0];
    end
  end

  // Window coefficient access.
  assign coef_addr  = bus_addr[$clog2(N_FFT)-1:0];
  assign coef_we    = bus_wr && (bus_addr[BUS_AW-1:BUS_AW-2] == PAGE_WINDOW);
  assign coef_wdata = bus_wdata[COEF_W-1:0];

  // Read data, one clock after the address.
  always_ff @(posedge clk) begin
    logic [ACC_W-1:0] w;
    w = buffer[{rd_slot, bus_addr[BW:1]}];
    bus_rdata <= '0;
    unique case (bus_addr[BUS_AW-1:BUS_AW-2])
      PAGE_SPEC:   bus_rdata <= bus_addr[0] ? BUS_DW'(w >> BUS_DW) : w[BUS_DW-1:0];
      PAGE_WINDOW: bus_rdata <= BUS_DW'(coef_rdata);
      default: begin
        if (bus_addr == REG_CTRL)   bus_rdata <= BUS_DW'(enable);
        if (bus_addr == REG_NAVG)   bus_rdata <= BUS_DW'(n_avg);
        if (bus_addr == REG_STATUS) bus_rdata <= {overflows, 8'd0, 8'(stored)};
        if (bus_addr == REG_HEAD)   bus_rdata <= {(stored != '0), 23'd0, 8'(slot_ch[rd_slot])};
        if (bus_addr == REG_DROPS)  bus_rdata <= drops;
      end
    endcase
  end

  a_done_one_cycle: assert property (@(posedge clk) disable iff (rst) done |=> !done);
endmodule
