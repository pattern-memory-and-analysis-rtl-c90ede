// tb_echo_nn_top -- end-to-end test of the recogniser at its full size.
// The top runs with its default parameters: 60 neurons (4 objects x 15
// zones), 256 samples, 15360 weights. Everything goes through the host wire
// ports, as the host would drive them:
//   * loads all 15360 weights, 60 biases and a 256-sample input vector,
//     with negative values, one magnitude that saturates, an out-of-range
//     index, and a transfer sent while the engine is busy (both ignored);
//   * runs four classifications, reloading the input vector and two biases
//     between runs so that a different object wins each time;
//   * after each run reads back all 60 neuron outputs and checks them, the
//     winner, its object and zone, and the 258-clock latency, against
//     an integer model of M_weights x M_input + M_bias kept here.
// Every mechanism is counted; one that never happened is a failure.
module tb_echo_nn_top;
  import echo_nn_pkg::*;
  localparam int NEU = N_NEURONS, SMP = N_SAMPLES, ZN = ZONES_PER_OBJECT;
  localparam int LATENCY = (NEU / N_LANES) * SMP + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0]  wi_target = 2'd3;
  logic [15:0] wi_index = '0, wi_mag = '0;
  logic        wi_sign = 1'b0, wi_strobe = 1'b0, wi_start = 1'b0;
  logic [5:0]  wi_read_sel = '0;
  logic signed [24:0] wo_answer, wo_win_value;
  logic        wo_busy, wo_done, wo_sat, wo_dropped;
  logic [5:0]  wo_winner;
  logic [1:0]  wo_object;
  logic [3:0]  wo_zone;
  logic [15:0] wo_writes;

  int wm [NEU * SMP];
  int bm [NEU];
  int xm [SMP];
  int checks = 0, failures = 0;
  int n_transfers = 0;
  int cov_weight = 0, cov_bias = 0, cov_input = 0, cov_negative = 0, cov_sat = 0;
  int cov_range_drop = 0, cov_busy_drop = 0, cov_runs = 0;
  int cov_obj [4] = '{0, 0, 0, 0};

  echo_nn_top dut (
    .clk, .rst_n, .wi_target, .wi_index, .wi_mag, .wi_sign, .wi_strobe, .wi_start,
    .wi_read_sel, .wo_answer, .wo_busy, .wo_done, .wo_winner, .wo_object, .wo_zone,
    .wo_win_value, .wo_writes, .wo_sat, .wo_dropped
  );

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // one host transfer: set the wires, flip the strobe, wait one clock
  task automatic send(input int tgt, input int idx, input int value);
    int m;
    m = (value < 0) ? -value : value;
    @(negedge clk);
    wi_target = 2'(tgt);
    wi_index  = 16'(idx);
    wi_mag    = 16'(m);
    wi_sign   = (value < 0);
    wi_strobe = ~wi_strobe;
    if (tgt == 0) cov_weight++;
    if (tgt == 1) cov_bias++;
    if (tgt == 2) cov_input++;
    if (value < 0) cov_negative++;
  endtask

  // model of what an accepted transfer stores
  function automatic int stored(input int value);
    if (value > 32767)  return 32767;
    if (value < -32767) return -32767;
    return value;
  endfunction

  task automatic classify_and_check();
    int expv [NEU];
    int best, edges, t0;
    for (int n = 0; n < NEU; n++) begin
      expv[n] = bm[n];
      for (int j = 0; j < SMP; j++) if (xm[j] != 0) expv[n] += wm[n * SMP + j];
    end
    best = 0;
    for (int n = 1; n < NEU; n++) if (expv[n] > expv[best]) best = n;
    @(negedge clk);
    wi_start = 1'b1;               // sampled at the next edge
    @(posedge clk); #1;
    t0 = cyc;
    @(negedge clk);
    wi_start = 1'b0;
    check(wo_busy, "busy after start");
    // a transfer while busy must be ignored
    if (cov_runs == 1) begin
      check(!wo_dropped, "drop flag cleared by start");
      send(0, 5, 777);
      @(posedge clk); @(posedge clk); #1;
      cov_busy_drop += (wo_dropped ? 1 : 0);
      check(wo_dropped, "transfer during run dropped");
    end
    while (!wo_done && cyc - t0 < LATENCY + 50) begin
      @(posedge clk); #1;
    end
    edges = cyc - t0;
    check(edges == LATENCY, $sformatf("latency %0d exp %0d", edges, LATENCY));
    check(!wo_busy, "not busy when done");
    cov_runs++;
    check(int'(wo_winner) == best, $sformatf("winner %0d exp %0d", wo_winner, best));
    check(int'(wo_win_value) == expv[best], $sformatf("winner value %0d exp %0d", wo_win_value, expv[best]));
    check(int'(wo_object) == best / ZN && int'(wo_zone) == best % ZN,
          $sformatf("object/zone %0d/%0d exp %0d/%0d", wo_object, wo_zone, best / ZN, best % ZN));
    cov_obj[best / ZN]++;
    for (int n = 0; n < NEU; n++) begin
      @(negedge clk);
      wi_read_sel = 6'(n);
      @(posedge clk); #1;
      check(int'(wo_answer) == expv[n], $sformatf("neuron %0d answer %0d exp %0d", n, wo_answer, expv[n]));
    end
  endtask

  initial begin
    automatic int forced [4] = '{7, 22, 37, 52};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // weights, small so that a large bias decides the winner
    for (int i = 0; i < NEU * SMP; i++) begin
      automatic int v = $urandom_range(0, 200) - 100;
      if (i == 59 * SMP + 3) v = -40000;   // clipped to -32767
      wm[i] = stored(v);
      send(0, i, v);
      n_transfers++;
    end
    @(posedge clk); @(posedge clk); #1;
    cov_sat += wo_sat ? 1 : 0;
    check(wo_sat, "saturation flagged");
    for (int n = 0; n < NEU; n++) begin
      bm[n] = $urandom_range(0, 2000) - 1000;
      send(1, n, bm[n]);
      n_transfers++;
    end
    // out-of-range bias index: ignored
    send(1, NEU + 3, 999);
    @(posedge clk); @(posedge clk); #1;
    cov_range_drop += wo_dropped ? 1 : 0;
    check(wo_dropped, "out-of-range transfer dropped");
    for (int run = 0; run < 4; run++) begin
      for (int j = 0; j < SMP; j++) begin
        xm[j] = $urandom_range(0, 1);
        send(2, j, xm[j]);
        n_transfers++;
      end
      if (run > 0) begin
        bm[forced[run - 1]] = -500;
        send(1, forced[run - 1], -500);
        n_transfers++;
      end
      bm[forced[run]] = 32000;
      send(1, forced[run], 32000);
      n_transfers++;
      @(posedge clk); @(posedge clk); #1;
      check(int'(wo_writes) == (n_transfers & 16'hffff),
            $sformatf("write count %0d exp %0d", wo_writes, n_transfers & 16'hffff));
      classify_and_check();
    end
    check(cov_weight > 0 && cov_bias > 0 && cov_input > 0, "all targets loaded");
    check(cov_negative > 0, "negative values sent");
    check(cov_sat > 0, "saturation happened");
    check(cov_range_drop > 0 && cov_busy_drop > 0, "both drop causes happened");
    check(cov_runs == 4, "four classifications");
    check(cov_obj[0] > 0 && cov_obj[1] > 0 && cov_obj[2] > 0 && cov_obj[3] > 0, "every object won once");
    $display("coverage: weights=%0d biases=%0d inputs=%0d negative=%0d sat=%0d range_drop=%0d busy_drop=%0d runs=%0d objects=%0d/%0d/%0d/%0d",
             cov_weight, cov_bias, cov_input, cov_negative, cov_sat, cov_range_drop, cov_busy_drop,
             cov_runs, cov_obj[0], cov_obj[1], cov_obj[2], cov_obj[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
