// tb_matrix_loader -- self-checking test of the host-transfer loader.
// Uses 4 neurons x 8 samples (32 weights) in 2 lanes (2 neurons per bank),
// and checks the flat-index -> (bank, word) mapping as well. Sends random transfers to every
// target, some out of range, some while `hold` is high, some with large
// magnitudes, and checks after each clock edge exactly which write strobe
// fired, with what address and data, and the sat/dropped pulses. Also checks
// that nothing is written in cycles where the strobe does not change.
module tb_matrix_loader;
  import echo_nn_pkg::*;
  localparam int NEU = 4, SMP = 8, WD = NEU * SMP, LN = 2, RWS = NEU / LN;
  logic clk = 1'b0, rst_n = 1'b0;
  target_e target = TGT_NONE;
  logic [15:0] index = '0, mag = '0;
  logic neg = 1'b0, strobe = 1'b0, hold = 1'b0;
  logic w_we, b_we, x_we, x_data, sat, dropped;
  logic [$clog2(RWS * SMP)-1:0] w_addr;
  logic [0:0] b_addr, w_bank, b_bank;
  logic [$clog2(SMP)-1:0] x_addr;
  logic signed [15:0] w_data, b_data;
  int checks = 0, failures = 0;
  int n_w = 0, n_b = 0, n_x = 0, n_drop = 0, n_sat = 0;

  matrix_loader #(.WIRE_WIDTH(16), .VAL_WIDTH(16), .NEURONS(NEU), .SAMPLES(SMP), .LANES(LN)) dut (
    .clk, .rst_n, .target, .index, .mag, .neg, .strobe, .hold,
    .w_we, .w_bank, .w_addr, .w_data, .b_we, .b_bank, .b_addr, .b_data, .x_we, .x_addr, .x_data,
    .sat, .dropped
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(input logic ew, eb, ex, es, ed,
                            input int addr, input int data);
    checks++;
    if (w_we !== ew || b_we !== eb || x_we !== ex || sat !== es || dropped !== ed) begin
      failures++;
      $display("FAIL strobes w%0b b%0b x%0b s%0b d%0b exp w%0b b%0b x%0b s%0b d%0b",
               w_we, b_we, x_we, sat, dropped, ew, eb, ex, es, ed);
    end
    if (ew) begin
      checks++;
      if (int'(w_bank) != (addr / SMP) / RWS || int'(w_addr) != ((addr / SMP) % RWS) * SMP + addr % SMP ||
          int'(w_data) != data) begin
        failures++; $display("FAIL weight bank %0d addr %0d data %0d for index %0d exp %0d", w_bank, w_addr, w_data, addr, data);
      end
    end
    if (eb) begin
      checks++;
      if (int'(b_bank) != addr / RWS || int'(b_addr) != addr % RWS || int'(b_data) != data) begin
        failures++; $display("FAIL bias bank %0d addr %0d data %0d for index %0d exp %0d", b_bank, b_addr, b_data, addr, data);
      end
    end
    if (ex) begin
      checks++;
      if (int'(x_addr) != addr || int'(x_data) != data) begin
        failures++; $display("FAIL input addr %0d data %0d exp %0d %0d", x_addr, x_data, addr, data);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    repeat (1500) begin
      int t, lim, m, v;
      logic h, ok, s;
      t = $urandom_range(0, 3);
      target = target_e'(t);
      lim = (t == 0) ? WD : (t == 1) ? NEU : (t == 2) ? SMP : 0;
      index = 16'($urandom_range(0, 7) == 0 ? $urandom_range(0, 70) : $urandom_range(0, (lim > 0 ? lim : 4) - 1));
      m = ($urandom_range(0, 9) == 0) ? $urandom_range(32768, 65535) : $urandom_range(0, 1000);
      if (t == 2) m = ($urandom_range(0, 9) == 0) ? m : $urandom_range(0, 1);
      mag = 16'(m);
      neg = 1'($urandom);
      h = ($urandom_range(0, 9) == 0);
      hold = h;
      strobe = ~strobe;
      ok = !h && (int'(index) < lim);
      s = ok && (t != 2) && (m > 32767);
      v = (m > 32767) ? 32767 : m;
      if (neg) v = -v;
      if (t == 2) v = (m != 0);
      @(posedge clk); #1;
      expect_out(ok && t == 0, ok && t == 1, ok && t == 2, s, !ok, int'(index), v);
      if (ok && t == 0) n_w++;
      if (ok && t == 1) n_b++;
      if (ok && t == 2) n_x++;
      if (!ok) n_drop++;
      if (s) n_sat++;
      // an idle cycle: wires change, strobe does not -> nothing happens
      @(negedge clk);
      index = 16'($urandom); hold = 1'b0;
      @(posedge clk); #1;
      expect_out(1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 0, 0);
      @(negedge clk);
    end
    checks++;
    if (n_w == 0 || n_b == 0 || n_x == 0 || n_drop == 0 || n_sat == 0) begin
      failures++;
      $display("FAIL coverage w=%0d b=%0d x=%0d drop=%0d sat=%0d", n_w, n_b, n_x, n_drop, n_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
