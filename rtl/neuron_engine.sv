// neuron_engine -- computes the answer matrix  M_answer = M_weights x M_input + M_bias.
//
// The input vector is binary (the host normalises each sonar sample to 0 or
// 1), so a neuron's output needs no multiplier: it is the sum of the weights
// whose input bit is 1, plus the neuron's bias. That add-where-the-input-is-1
// method, and treating the neurons as identical small processors working in
// parallel, follow the design description. The lane organisation below is
// this implementation's.
//
// LANES identical lanes (one adder and accumulator each) run side by side;
// lane l evaluates neurons l*ROWS .. l*ROWS+ROWS-1, one after another, where
// ROWS = NEURONS / LANES. At the default LANES = NEURONS = 60 every neuron has
// its own lane and ROWS = 1. Lane l reads its own weight bank, which holds
// its ROWS weight rows back to back (local address r*SAMPLES + j), and its
// own bias bank (local address r). All lanes step through the same local
// address at the same time, so one address bus serves every bank, and the
// input bit x[j] is shared.
//
// Pipeline: in the issue cycle the engine drives w_raddr = r*SAMPLES + j,
// x_raddr = j and b_raddr = r to synchronous-read arrays; their data arrives
// in the next cycle, where each lane adds (x ? w : 0) to its accumulator.
// At the last sample of row r each lane adds its bias and the engine sends
// all LANES results out together for one cycle: out_val[l] is neuron
// l*ROWS + out_row.
//
// Timing: `start` is sampled on a clock edge while not busy. Row r appears
// (r+1)*SAMPLES+1 edges after that edge; `done` pulses with the last row,
// ROWS*SAMPLES+1 edges after start (257 at the default sizes). `busy` is
// high from the start edge until the done edge; a `start` while busy is
// ignored.
module neuron_engine
  import echo_nn_pkg::*;
#(
  parameter int unsigned NEURONS   = N_NEURONS,
  parameter int unsigned SAMPLES   = N_SAMPLES,
  parameter int unsigned LANES     = N_LANES,
  parameter int unsigned VAL_WIDTH = VALUE_W,
  parameter int unsigned ACC_WIDTH = VALUE_W + $clog2(N_SAMPLES) + 1,
  localparam int unsigned ROWS     = NEURONS / LANES,
  localparam int unsigned RW       = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned BANK_D   = ROWS * SAMPLES,
  localparam int unsigned WA_W     = (BANK_D > 1) ? $clog2(BANK_D) : 1,
  localparam int unsigned XA_W     = (SAMPLES > 1) ? $clog2(SAMPLES) : 1
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   start,
  // weight banks: one shared local address, one word per lane back
  output logic [WA_W-1:0]                        w_raddr,
  input  logic [LANES-1:0][VAL_WIDTH-1:0]        w_rdata,
  // bias banks
  output logic [RW-1:0]                          b_raddr,
  input  logic [LANES-1:0][VAL_WIDTH-1:0]        b_rdata,
  // input-vector read port
  output logic [XA_W-1:0]                        x_raddr,
  input  logic                                   x_rdata,
  // results, one row of all lanes per pulse of out_valid
  output logic                                   out_valid,
  output logic [RW-1:0]                          out_row,
  output logic [LANES-1:0][ACC_WIDTH-1:0]        out_val,
  output logic                                   busy,
  output logic                                   done
);

  if (NEURONS % LANES != 0) begin : g_bad_lanes
    $error("neuron_engine: NEURONS must be a multiple of LANES");
  end

  // issue stage
  logic            running;
  logic [RW-1:0]   r_cnt;
  logic [XA_W-1:0] j_cnt;
  logic [WA_W-1:0] w_cnt;
  logic            last_j;
  logic            last_r;

  // data stage (the arrays' read data belongs to these)
  logic            s1_valid;
  logic            s1_first;
  logic            s1_last;
  logic [RW-1:0]   s1_r;

  logic signed [ACC_WIDTH-1:0] acc [LANES];
  logic signed [ACC_WIDTH-1:0] sum [LANES];

  assign last_j  = (32'(j_cnt) == SAMPLES - 1);
  assign last_r  = (32'(r_cnt) == ROWS - 1);
  assign w_raddr = w_cnt;
  assign x_raddr = j_cnt;
  assign b_raddr = r_cnt;
  assign busy    = running || s1_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      r_cnt   <= '0;
      j_cnt   <= '0;
      w_cnt   <= '0;
    end else if (!running) begin
      if (start && !busy) begin
        running <= 1'b1;
        r_cnt   <= '0;
        j_cnt   <= '0;
        w_cnt   <= '0;
      end
    end else begin
      w_cnt <= w_cnt + 1'b1;
      if (last_j) begin
        j_cnt <= '0;
        r_cnt <= r_cnt + 1'b1;
        if (last_r) running <= 1'b0;
      end else begin
        j_cnt <= j_cnt + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_first <= 1'b0;
      s1_last  <= 1'b0;
      s1_r     <= '0;
    end else begin
      s1_valid <= running;
      s1_first <= (j_cnt == '0);
      s1_last  <= last_j;
      s1_r     <= r_cnt;
    end
  end

  // the lanes: conditional add of the weight, bias at the end of a row
  for (genvar l = 0; l < LANES; l++) begin : g_lane
    always_comb begin
      sum[l] = s1_first ? '0 : acc[l];
      if (x_rdata) sum[l] = sum[l] + ACC_WIDTH'(signed'(w_rdata[l]));
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        acc[l]     <= '0;
        out_val[l] <= '0;
      end else if (s1_valid) begin
        acc[l] <= sum[l];
        if (s1_last) out_val[l] <= sum[l] + ACC_WIDTH'(signed'(b_rdata[l]));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_row   <= '0;
      done      <= 1'b0;
    end else begin
      out_valid <= s1_valid && s1_last;
      done      <= s1_valid && s1_last && (32'(s1_r) == ROWS - 1);
      if (s1_valid && s1_last) out_row <= s1_r;
    end
  end

  // protocol rules: done only with the last row; results only while busy
  a_done_with_row: assert property (@(posedge clk) disable iff (!rst_n) done |-> out_valid);
  a_row_in_range:  assert property (@(posedge clk) disable iff (!rst_n)
                                    out_valid |-> 32'(out_row) < ROWS);

endmodule
