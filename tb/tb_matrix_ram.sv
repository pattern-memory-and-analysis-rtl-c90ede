// tb_matrix_ram -- self-checking test of the one-dimensional array.
// A small 16 x 37 instance is filled with random words, then read back at
// random addresses while random writes continue; a model array tracks the
// expected contents. Checks the one-cycle synchronous read latency and that
// a read in the cycle of a write to the same word returns the old word.
module tb_matrix_ram;
  localparam int W = 16, D = 37, AW = $clog2(D);
  logic clk = 1'b0;
  logic we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  matrix_ram #(.WIDTH(W), .DEPTH(D)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] expect_q;
    // fill
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = W'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 1'b0;
    // mixed reads and writes
    repeat (3000) begin
      @(negedge clk);
      raddr = AW'($urandom_range(0, D - 1));
      we    = 1'($urandom);
      waddr = ($urandom_range(0, 3) == 0) ? raddr : AW'($urandom_range(0, D - 1));
      wdata = W'($urandom);
      expect_q = model[raddr];        // old word, even if written this cycle
      if (we) model[waddr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        $display("FAIL raddr=%0d rdata=%h exp=%h", raddr, rdata, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
