// tb_sign_mag_to_twos -- self-checking test of the sign/magnitude converter.
// Drives corner magnitudes and 2000 random ones with both sign flags and
// compares with an integer model: value = (neg ? -1 : 1) * min(mag, 32767).
module tb_sign_mag_to_twos;
  logic [15:0]        mag;
  logic               neg;
  logic signed [15:0] out;
  logic               sat;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  sign_mag_to_twos #(.MAG_W(16), .OUT_W(16)) dut (.mag, .neg, .out, .sat);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] m, input logic n);
    int exp_v;
    logic exp_s;
    mag = m; neg = n;
    #1;
    exp_s = (int'(m) > 32767);
    exp_v = exp_s ? 32767 : int'(m);
    if (n) exp_v = -exp_v;
    checks++;
    if (int'(out) != exp_v || sat != exp_s) begin
      failures++;
      $display("FAIL mag=%0d neg=%0b out=%0d sat=%0b exp=%0d/%0b", m, n, out, sat, exp_v, exp_s);
    end
  endtask

  initial begin
    automatic logic [15:0] corner [6] = '{16'd0, 16'd1, 16'd1000, 16'd32767, 16'd32768, 16'd65535};
    foreach (corner[i]) begin
      check(corner[i], 1'b0);
      check(corner[i], 1'b1);
    end
    repeat (2000) check(16'($urandom), 1'($urandom));
    repeat (500) check(16'($urandom_range(0, 1000)), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
