// tb_pac_monitor: drives a PAC monitor (4 windows of 16 cycles) with
//  1. a normal trace in learn mode, and checks each learned bound against the
//     maximum sliding-window count computed by the test from its own record
//     of the trace (Eq. 3 of the arrival-curve method),
//  2. the same normal trace replayed in detect mode: no violation,
//  3. an attack trace with three times the packet rate: violation and the
//     sticky attacked flag within one longest window,
//  4. clear, then a sleep interval: the monitor is inactive for exactly
//     det_sleep cycles after each ACTIVE_CYCLES period and raises nothing
//     while asleep.
module tb_pac_monitor;
  localparam int NWIN = 4, STEP = 16, ACT = 200, CW = 12;
  logic clk = 0, rst_n = 0;
  logic enable, learn, clear, bound_we, active, violation, attacked;
  logic [15:0] det_sleep;
  logic [2:0] arrivals;
  logic [1:0] bound_idx;
  logic [CW-1:0] bound_wdata;
  logic [NWIN-1:0][CW-1:0] bound, count;
  int checks = 0, failures = 0;

  pac_monitor #(.NWIN(NWIN), .WIN_STEP(STEP), .ACTIVE_CYCLES(ACT), .CNT_W(CW)) dut (.*);
  always #5 clk = ~clk;

  int trace [$];
  task automatic chk(bit c, string msg);
    checks++; if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // normal: a packet every 6..10 cycles; attack: every 2..3 cycles
  task automatic drive(int cycles, bit attack, bit record);
    int gap;
    gap = 0;
    repeat (cycles) begin
      @(negedge clk);
      if (gap == 0) begin
        arrivals = 3'(attack ? 1 : $urandom_range(1, 2));
        gap = attack ? $urandom_range(1, 2) : $urandom_range(5, 9);
      end else begin
        arrivals = 0; gap--;
      end
      if (record) trace.push_back(int'(arrivals));
    end
    @(negedge clk); arrivals = 0;
    if (record) trace.push_back(0);
  endtask

  initial begin
    int mx, s, t_att, first_v;
    enable = 0; learn = 1; clear = 0; bound_we = 0; bound_idx = 0; bound_wdata = 0;
    det_sleep = 0; arrivals = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); enable = 1;
    drive(1500, 0, 1);
    @(negedge clk);
    for (int k = 0; k < NWIN; k++) begin
      mx = 0;
      for (int t = 0; t + (k + 1) * STEP <= trace.size(); t++) begin
        s = 0;
        for (int j = 0; j < (k + 1) * STEP; j++) s += trace[t + j];
        if (s > mx) mx = s;
      end
      chk(int'(bound[k]) == mx, $sformatf("bound[%0d]=%0d exp %0d", k, bound[k], mx));
    end
    // detect, normal
    learn = 0;
    enable = 0; @(negedge clk); enable = 1;
    first_v = 0;
    fork
      foreach (trace[i]) begin @(negedge clk); arrivals = 3'(trace[i]); end
      repeat (trace.size()) @(posedge clk) if (violation) first_v++;
    join
    chk(first_v == 0 && !attacked, $sformatf("false alarms %0d", first_v));
    // attack
    t_att = 0;
    fork
      drive(NWIN * STEP * 2, 1, 0);
      begin
        while (!attacked && t_att < NWIN * STEP * 2) begin @(posedge clk); t_att++; end
      end
    join
    chk(attacked, "attack detected");
    chk(t_att <= NWIN * STEP, $sformatf("detection time %0d", t_att));
    // clear and sleep schedule
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    chk(!attacked, "cleared");
    enable = 0; det_sleep = 16'd150;
    @(negedge clk); enable = 1;
    begin
      int act_cnt, slp_cnt, v_sleep;
      act_cnt = 0; slp_cnt = 0; v_sleep = 0;
      fork
        drive(ACT + 150, 1, 0);
        repeat (ACT + 150) @(posedge clk) begin
          if (active) act_cnt++; else begin slp_cnt++; if (violation) v_sleep++; end
        end
      join
      chk(act_cnt + slp_cnt == ACT + 150 && slp_cnt >= 148 && slp_cnt <= 150,
          $sformatf("active %0d sleep %0d", act_cnt, slp_cnt));
      chk(v_sleep == 0, "no violation while asleep");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
