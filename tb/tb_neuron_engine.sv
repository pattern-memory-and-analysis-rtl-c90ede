// tb_neuron_engine -- self-checking test of the answer-matrix engine.
// A 6-neuron x 12-sample engine with 3 lanes (2 neurons per lane) reads
// synchronous model banks kept in this testbench. For three random
// weight/bias/input sets (weights and biases in +/-1000, the scaled range of
// trained values) it checks every neuron's result against
// sum_j x[j]*W[n][j] + b[n] computed here, the row order, the latency of
// each row ((r+1)*S+1 edges after start) and of `done` (ROWS*S+1 edges),
// that `busy` covers the run, and that a second `start` during a run is
// ignored. Neuron n lives in lane n / ROWS, row n % ROWS.
module tb_neuron_engine;
  localparam int N = 6, S = 12, L = 3, R = N / L, VW = 16, AW = VW + $clog2(S) + 1;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [$clog2(R*S)-1:0]      w_raddr;
  logic [0:0]                  b_raddr;
  logic [$clog2(S)-1:0]        x_raddr;
  logic [L-1:0][VW-1:0]        w_rdata, b_rdata;
  logic                        x_rdata;
  logic                        out_valid, busy, done;
  logic [0:0]                  out_row;
  logic [L-1:0][AW-1:0]        out_val;

  logic signed [VW-1:0] wmem [L][R*S];
  logic signed [VW-1:0] bmem [L][R];
  logic                 xmem [S];
  int checks = 0, failures = 0;

  neuron_engine #(.NEURONS(N), .SAMPLES(S), .LANES(L), .VAL_WIDTH(VW), .ACC_WIDTH(AW)) dut (
    .clk, .rst_n, .start, .w_raddr, .w_rdata, .b_raddr, .b_rdata, .x_raddr, .x_rdata,
    .out_valid, .out_row, .out_val, .busy, .done
  );

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    for (int l = 0; l < L; l++) begin
      w_rdata[l] <= wmem[l][w_raddr];
      b_rdata[l] <= bmem[l][b_raddr];
    end
    x_rdata <= xmem[x_raddr];
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int l = 0; l < L; l++) begin
      for (int i = 0; i < R * S; i++) wmem[l][i] = '0;
      for (int i = 0; i < R; i++) bmem[l][i] = '0;
    end
    for (int i = 0; i < S; i++) xmem[i] = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 3; run++) begin
      int expv [N];
      int next_r, edges;
      for (int n = 0; n < N; n++) begin
        for (int j = 0; j < S; j++)
          wmem[n / R][(n % R) * S + j] = VW'((run == 2 && n == 0) ? 1000 : $urandom_range(0, 2000) - 1000);
        bmem[n / R][n % R] = VW'($urandom_range(0, 2000) - 1000);
      end
      for (int i = 0; i < S; i++) xmem[i] = (run == 2) ? 1'b1 : 1'($urandom);
      for (int n = 0; n < N; n++) begin
        expv[n] = int'(bmem[n / R][n % R]);
        for (int j = 0; j < S; j++) if (xmem[j]) expv[n] += int'(wmem[n / R][(n % R) * S + j]);
      end
      @(negedge clk);
      check(!busy, "busy before start");
      start = 1'b1;
      @(negedge clk);               // engine sampled start at the edge before
      start = 1'b0;
      next_r = 0;
      edges = 1;
      while (!done && edges < R * S + 10) begin
        @(posedge clk); #1;
        if (edges == 5) start = 1'b1;    // ignored: engine is busy
        if (edges == 6) start = 1'b0;
        if (out_valid) begin
          check(int'(out_row) == next_r, $sformatf("order: row %0d exp %0d", out_row, next_r));
          for (int l = 0; l < L; l++)
            check(int'(signed'(out_val[l])) == expv[l * R + next_r],
                  $sformatf("neuron %0d value %0d exp %0d", l * R + next_r, signed'(out_val[l]), expv[l * R + next_r]));
          check(edges == (next_r + 1) * S + 1,
                $sformatf("row %0d latency %0d exp %0d", next_r, edges, (next_r + 1) * S + 1));
          next_r++;
        end
        if (!done) check(busy, "busy during run");
        edges++;
      end
      edges--;
      check(done && edges == R * S + 1, $sformatf("done after %0d edges, exp %0d", edges, R * S + 1));
      check(next_r == R, $sformatf("%0d rows, exp %0d", next_r, R));
      check(!busy, "busy cleared at done");
      @(posedge clk); #1;
      check(!done && !out_valid, "done is one pulse");
      repeat (3) @(posedge clk);
      check(!out_valid && !busy, "idle after run");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
