// data_forward: frame-to-symbol conversion between the synchroniser and the
// FFT ("data forwarding control").
//
// The received baseband stream is delayed so that the samples written
// line up with the peak: the synchroniser flags a window ending on sample t
// after sample t+5 has arrived, and with FWD_DELAY = 4 (a FWD_DELAY+1 stage
// line read before it shifts) the first sample written is t+1+CP-PEAK_SHIFT,
// i.e. the first data symbol's FFT window starts PEAK_SHIFT samples inside
// its cyclic prefix (checked in the testbench). A peak seen while idle starts a
// frame: the CFO corrector is loaded with the peak's angle, the remaining
// CP - PEAK_SHIFT cyclic prefix samples of the first data symbol are
// skipped (the start is moved PEAK_SHIFT samples into the prefix), and then
// for each of the NSYMS symbols N samples are written to the FIFO and the
// CP samples of the next symbol are dropped. Peaks are ignored until the
// frame is complete and for CP samples after it ('holdoff'), which covers
// the peak that the last data symbol's own prefix produces. The training
// symbol itself is not forwarded.
//
// The FIFO is written at the baseband rate and read at the clock rate, four
// times faster: whenever it holds a whole symbol and the FFT is ready, N
// samples are read in N consecutive clocks, which leaves the gap the burst
// FFT needs between symbols. 'fft_sym' numbers the symbol being loaded
// (0..NSYMS-1 within the frame).
//
// The constant delay before the FIFO, the peak-triggered writing without the
// prefix and the reading at four times the write rate follow the reference
// design; the delay value, the single FIFO, the hold-off and dropping the
// training symbol are this implementation's choices.
module data_forward
  import ofdm_pkg::*;
#(
  parameter int unsigned N          = 1024,
  parameter int unsigned CP         = 256,
  parameter int unsigned NSYMS      = 12,
  parameter int unsigned PEAK_SHIFT = 3,
  parameter int unsigned FWD_DELAY  = 4,
  parameter int unsigned FIFO_DEPTH = 2048
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  cplx_t         in_data,
  input  logic          peak,
  input  logic [AW-1:0] angle,
  input  logic          fft_ready,
  output logic          fft_valid,
  output cplx_t         fft_data,
  output logic [3:0]    fft_sym,
  output logic          frame_active,
  output logic          holdoff,
  output logic          overflow
);
  localparam int unsigned LG = $clog2(N);
  localparam int unsigned FW = $clog2(FIFO_DEPTH);

  // delay line compensating the peak-detection latency
  cplx_t dl [FWD_DELAY+1];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= FWD_DELAY; i++) dl[i] <= '0;
    end else if (in_valid) begin
      dl[0] <= in_data;
      for (int i = 1; i <= FWD_DELAY; i++) dl[i] <= dl[i-1];
    end
  end
  cplx_t dsample;
  assign dsample = dl[FWD_DELAY];

  // frame control on the delayed stream
  typedef enum logic [1:0] {F_IDLE, F_SKIP, F_WRITE, F_HOLD} fstate_e;
  fstate_e         fst;
  logic [LG:0]     fcnt;
  logic [3:0]      wsym;
  logic            wr_req;

  assign frame_active = (fst == F_SKIP) || (fst == F_WRITE);
  assign wr_req       = in_valid && (fst == F_WRITE);
  assign holdoff      = (fst == F_HOLD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fst <= F_IDLE; fcnt <= '0; wsym <= '0;
    end else begin
      case (fst)
        F_IDLE: if (peak) begin
          fst <= F_SKIP; fcnt <= (LG+1)'(CP - PEAK_SHIFT); wsym <= '0;
        end
        F_SKIP: if (in_valid) begin
          if (fcnt == (LG+1)'(1)) begin fst <= F_WRITE; fcnt <= (LG+1)'(N); end
          else fcnt <= fcnt - 1'b1;
        end
        F_HOLD: if (in_valid) begin
          if (fcnt == (LG+1)'(1)) fst <= F_IDLE;
          else fcnt <= fcnt - 1'b1;
        end
        default: if (in_valid) begin  // F_WRITE
          if (fcnt == (LG+1)'(1)) begin
            if (wsym == 4'(NSYMS - 1)) begin fst <= F_HOLD; fcnt <= (LG+1)'(CP); end
            else begin fst <= F_SKIP; fcnt <= (LG+1)'(CP); wsym <= wsym + 1'b1; end
          end else fcnt <= fcnt - 1'b1;
        end
      endcase
    end
  end

  // CFO correction of the written samples; the phase advances every sample
  logic  cv;
  cplx_t cd;
  cfo_correct #(.N(N)) u_cfo (
    .clk, .rst_n, .load(peak && fst == F_IDLE), .angle,
    .adv(in_valid), .in_valid(wr_req), .in_data(dsample),
    .out_valid(cv), .out_data(cd));

  // FIFO: written at the sample rate, read in bursts of N
  cplx_t         fifo [FIFO_DEPTH];
  logic [FW:0]   wptr, rptr, count;
  logic          reading;
  logic [LG-1:0] rcnt;
  logic [3:0]    rsym;

  assign count = wptr - rptr;

  always_ff @(posedge clk) begin
    if (cv) fifo[wptr[FW-1:0]] <= cd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0; rptr <= '0; reading <= 1'b0; rcnt <= '0; rsym <= '0;
      fft_valid <= 1'b0; fft_data <= '0; fft_sym <= '0; overflow <= 1'b0;
    end else begin
      fft_valid <= 1'b0;
      if (cv) begin
        wptr <= wptr + 1'b1;
        if (count == (FW+1)'(FIFO_DEPTH)) overflow <= 1'b1;
      end
      if (!reading) begin
        if (fft_ready && !fft_valid && count >= (FW+1)'(N)) begin
          reading <= 1'b1; rcnt <= '0; fft_sym <= rsym;
        end
      end else begin
        fft_valid <= 1'b1;
        fft_data  <= fifo[rptr[FW-1:0]];
        rptr      <= rptr + 1'b1;
        rcnt      <= rcnt + 1'b1;
        if (rcnt == LG'(N - 1)) begin
          reading <= 1'b0;
          rsym    <= (rsym == 4'(NSYMS - 1)) ? '0 : rsym + 1'b1;
        end
      end
    end
  end
endmodule
