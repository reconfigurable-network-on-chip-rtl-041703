// pac_monitor: per-router DoS attack detection with packet arrival curve
// (PAC) bounds.
//
// Every cycle the router reports how many packets (head flits) entered its
// buffers. The monitor keeps the arrival history of the last NWIN * WIN_STEP
// cycles in a circular buffer and, for each window length
// Delta_k = (k+1) * WIN_STEP, a running count of arrivals inside the sliding
// window [t - Delta_k, t): the count gains this cycle's arrivals and loses the
// entry that falls out of the window. These are the packet counts
// N[t - Delta, t) of the arrival curve.
//
//   learn mode:  the upper PAC bound lambda_u(Delta_k) is built as the largest
//                count ever seen for each window (sliding the window over the
//                normal-operation trace);
//   detect mode: a count above its bound is a bound violation; it raises the
//                sticky flag `attacked` until `clear`.
// Bounds can also be written from outside (bound_we) when they were profiled
// offline. With det_sleep = 0 the monitor is always active; otherwise it is
// active for ACTIVE_CYCLES, then sleeps det_sleep cycles (history cleared,
// nothing counted) and starts again, trading detection delay for energy, as
// the detectionInterval parameter does in the architecture. enable = 0
// (tiers 0-2) keeps it asleep. Until bounds exist (a learn period or a bound
// write since reset) nothing is flagged: all-zero bounds are no profile.
//
// Window count, window step and active period are this design's choices; the
// sliding-window maximum and the bound comparison follow the architecture.
module pac_monitor #(
  parameter int unsigned NWIN          = 8,
  parameter int unsigned WIN_STEP      = 32,
  parameter int unsigned ACTIVE_CYCLES = 1024,
  parameter int unsigned CNT_W         = 12
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       enable,
  input  logic                       learn,
  input  logic [15:0]                det_sleep,
  input  logic [2:0]                 arrivals,
  input  logic                       clear,
  input  logic                       bound_we,
  input  logic [$clog2(NWIN)-1:0]    bound_idx,
  input  logic [CNT_W-1:0]           bound_wdata,
  output logic [NWIN-1:0][CNT_W-1:0] bound,
  output logic [NWIN-1:0][CNT_W-1:0] count,
  output logic                       active,
  output logic                       violation,
  output logic                       attacked
);
  localparam int unsigned HIST = NWIN * WIN_STEP;
  localparam int unsigned HW   = $clog2(HIST);

  logic [2:0]    hist [HIST];
  logic [HW-1:0] ptr;
  logic [15:0]   phase;          // position in the active/sleep cycle
  logic          sleeping;
  logic [NWIN-1:0] over;
  logic          profiled;       // bounds exist (learnt or written)

  assign active = enable && !sleeping;

  always_comb begin
    for (int k = 0; k < NWIN; k++) over[k] = (count[k] > bound[k]);
  end
  assign violation = active && !learn && profiled && (|over);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr      <= '0;
      phase    <= '0;
      sleeping <= 1'b0;
      count    <= '0;
      bound    <= '0;
      attacked <= 1'b0;
      profiled <= 1'b0;
    end else begin
      if ((active && learn) || bound_we) profiled <= 1'b1;
      // active / sleep schedule
      if (!enable) begin
        sleeping <= 1'b0;
        phase    <= '0;
      end else if (!sleeping) begin
        if (det_sleep != '0 && phase == 16'(ACTIVE_CYCLES - 1)) begin
          sleeping <= 1'b1;
          phase    <= '0;
        end else phase <= phase + 1'b1;
      end else begin
        if (phase >= det_sleep - 1'b1) begin
          sleeping <= 1'b0;
          phase    <= '0;
        end else phase <= phase + 1'b1;
      end

      if (active) begin
        ptr <= (ptr == HW'(HIST - 1)) ? '0 : ptr + 1'b1;
        for (int k = 0; k < NWIN; k++)
          count[k] <= count[k] + CNT_W'(arrivals) - CNT_W'(hist[HW'((HIST + 32'(ptr) - (k + 1) * WIN_STEP) % HIST)]);
      end else begin
        count <= '0;
      end

      if (active && learn)
        for (int k = 0; k < NWIN; k++)
          if (count[k] > bound[k]) bound[k] <= count[k];
      if (bound_we) bound[bound_idx] <= bound_wdata;

      if (clear) attacked <= 1'b0;
      else if (violation) attacked <= 1'b1;
    end
  end

  // History buffer: cleared while inactive, so a window never counts arrivals
  // from before a sleep period.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < HIST; i++) hist[i] <= '0;
    end else if (active) begin
      hist[ptr] <= arrivals;
    end else begin
      for (int i = 0; i < HIST; i++) hist[i] <= '0;
    end
  end
endmodule
