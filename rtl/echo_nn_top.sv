// echo_nn_top -- FPGA side of a sonar object recogniser modelled on bat echolocation.
//
// A single-layer perceptron of 60 neurons classifies a 256-sample sonar echo
// as one of four pole arrangements (objects A-D) at one of 15 distance zones.
// Training happens on the host; this design holds the trained weight and
// bias matrices, takes a binarised echo, computes every neuron's output
// (M_answer = M_weights x M_input + M_bias) and reports the winning neuron.
//
// Data path:
//   host wires -> matrix_loader -> weight / bias / input arrays (matrix_ram)
//   arrays -> neuron_engine -> answer arrays (matrix_ram) and winner_tracker
// The neurons are evaluated by LANES parallel lanes (60 by default: one per
// neuron); weights, biases and answers are split into one bank per lane.
//
// The host link is a set of "wires": registers the host PC writes and reads
// through the board's USB host-interface core, which is a vendor netlist and
// is not part of this RTL. Its wire-in values enter here as the wi_* ports
// and the wo_* ports are what it would read back. All ports are synchronous
// to clk, the host-interface clock.
//
// Host protocol (the transfer scheme follows the design description; the
// strobe, start and status details are this implementation's):
//   1. For each value: set wi_target (0 weight, 1 bias, 2 input), wi_index
//      (flat index; weight n*256+j), wi_mag (|value| x 1000 for weights and
//      biases, 0/1 for the input) and wi_sign, then toggle wi_strobe.
//   2. Raise wi_start (a rising edge starts one classification). Transfers
//      made while wo_busy is high, or with an index outside the array, are
//      ignored and set wo_dropped, which the next start clears; wo_sat
//      (a magnitude too large for 16 bits was clipped) stays set until reset.
//   3. Poll wo_done; read wo_winner / wo_object / wo_zone / wo_win_value, and
//      any neuron's output by setting wi_read_sel and reading wo_answer one
//      clock later.
// One classification takes (60 / LANES) x 256 + 2 clocks from the clock edge
// that samples the wi_start rise to the edge that sets wo_done: 258 clocks
// at the defaults.
module echo_nn_top
  import echo_nn_pkg::*;
#(
  parameter int unsigned OBJECTS   = N_OBJECTS,
  parameter int unsigned ZONES     = ZONES_PER_OBJECT,
  parameter int unsigned SAMPLES   = N_SAMPLES,
  parameter int unsigned LANES     = N_LANES,
  parameter int unsigned VAL_WIDTH = VALUE_W,
  localparam int unsigned NEURONS  = OBJECTS * ZONES,
  localparam int unsigned ROWS     = NEURONS / LANES,
  localparam int unsigned BANK_D   = ROWS * SAMPLES,
  localparam int unsigned ACC_W    = VAL_WIDTH + $clog2(SAMPLES) + 1,
  localparam int unsigned WA_W     = (BANK_D > 1) ? $clog2(BANK_D) : 1,
  localparam int unsigned RW       = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned LB_W     = (LANES > 1) ? $clog2(LANES) : 1,
  localparam int unsigned NA_W     = (NEURONS > 1) ? $clog2(NEURONS) : 1,
  localparam int unsigned XA_W     = (SAMPLES > 1) ? $clog2(SAMPLES) : 1,
  localparam int unsigned OB_W     = (OBJECTS > 1) ? $clog2(OBJECTS) : 1,
  localparam int unsigned ZN_W     = (ZONES > 1) ? $clog2(ZONES) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // wire-ins
  input  logic [1:0]              wi_target,
  input  logic [WIRE_W-1:0]       wi_index,
  input  logic [WIRE_W-1:0]       wi_mag,
  input  logic                    wi_sign,
  input  logic                    wi_strobe,
  input  logic                    wi_start,
  input  logic [NA_W-1:0]         wi_read_sel,
  // wire-outs
  output logic signed [ACC_W-1:0] wo_answer,     // output of neuron wi_read_sel
  output logic                    wo_busy,
  output logic                    wo_done,       // answers valid since the last start
  output logic [NA_W-1:0]         wo_winner,     // neuron that fired
  output logic [OB_W-1:0]         wo_object,     // 0 = A .. 3 = D
  output logic [ZN_W-1:0]         wo_zone,       // distance zone in its group
  output logic signed [ACC_W-1:0] wo_win_value,
  output logic [WIRE_W-1:0]       wo_writes,     // accepted transfers (wraps)
  output logic                    wo_sat,        // a magnitude was clipped
  output logic                    wo_dropped     // a transfer was ignored since the last start
);

  // loader -> arrays
  logic                        w_we, b_we, x_we;
  logic [LB_W-1:0]             w_wbank, b_wbank;
  logic [WA_W-1:0]             w_waddr;
  logic [RW-1:0]               b_waddr;
  logic [XA_W-1:0]             x_waddr;
  logic signed [VAL_WIDTH-1:0] w_wdata, b_wdata;
  logic                        x_wdata;
  logic                        ld_sat, ld_dropped;

  // engine <-> arrays
  logic [WA_W-1:0]                   w_raddr;
  logic [RW-1:0]                     b_raddr;
  logic [XA_W-1:0]                   x_raddr;
  logic [LANES-1:0][VAL_WIDTH-1:0]   w_rdata, b_rdata;
  logic                              x_rdata;
  logic                              res_valid;
  logic [RW-1:0]                     res_row;
  logic [LANES-1:0][ACC_W-1:0]       res_val;
  logic                              eng_busy, eng_done;

  // answer readout
  logic [LANES-1:0][ACC_W-1:0]       ans_rdata;
  logic [LB_W-1:0]                   sel_bank, sel_bank_q;
  logic [RW-1:0]                     sel_row;

  logic start_q, start_pulse;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) start_q <= 1'b0;
    else        start_q <= wi_start;
  end
  assign start_pulse = wi_start && !start_q && !eng_busy;

  matrix_loader #(
    .WIRE_WIDTH(WIRE_W), .VAL_WIDTH(VAL_WIDTH), .NEURONS(NEURONS), .SAMPLES(SAMPLES),
    .LANES(LANES)
  ) u_loader (
    .clk, .rst_n,
    .target  (target_e'(wi_target)),
    .index   (wi_index),
    .mag     (wi_mag),
    .neg     (wi_sign),
    .strobe  (wi_strobe),
    .hold    (eng_busy),
    .w_we, .w_bank(w_wbank), .w_addr(w_waddr), .w_data(w_wdata),
    .b_we, .b_bank(b_wbank), .b_addr(b_waddr), .b_data(b_wdata),
    .x_we, .x_addr(x_waddr), .x_data(x_wdata),
    .sat     (ld_sat),
    .dropped (ld_dropped)
  );

  matrix_ram #(.WIDTH(1), .DEPTH(SAMPLES)) u_inputs (
    .clk, .we(x_we), .waddr(x_waddr), .wdata(x_wdata), .raddr(x_raddr), .rdata(x_rdata)
  );

  // one weight bank, bias bank and answer bank per lane
  assign sel_bank = LB_W'(32'(wi_read_sel) / ROWS);
  assign sel_row  = RW'(32'(wi_read_sel) % ROWS);

  for (genvar l = 0; l < LANES; l++) begin : g_bank
    matrix_ram #(.WIDTH(VAL_WIDTH), .DEPTH(BANK_D)) u_weights (
      .clk, .we(w_we && w_wbank == LB_W'(l)), .waddr(w_waddr), .wdata(w_wdata),
      .raddr(w_raddr), .rdata(w_rdata[l])
    );
    matrix_ram #(.WIDTH(VAL_WIDTH), .DEPTH(ROWS)) u_biases (
      .clk, .we(b_we && b_wbank == LB_W'(l)), .waddr(b_waddr), .wdata(b_wdata),
      .raddr(b_raddr), .rdata(b_rdata[l])
    );
    matrix_ram #(.WIDTH(ACC_W), .DEPTH(ROWS)) u_answers (
      .clk, .we(res_valid), .waddr(res_row), .wdata(res_val[l]),
      .raddr(sel_row), .rdata(ans_rdata[l])
    );
  end

  neuron_engine #(
    .NEURONS(NEURONS), .SAMPLES(SAMPLES), .LANES(LANES), .VAL_WIDTH(VAL_WIDTH), .ACC_WIDTH(ACC_W)
  ) u_engine (
    .clk, .rst_n,
    .start     (start_pulse),
    .w_raddr, .w_rdata,
    .b_raddr, .b_rdata,
    .x_raddr, .x_rdata,
    .out_valid (res_valid),
    .out_row   (res_row),
    .out_val   (res_val),
    .busy      (eng_busy),
    .done      (eng_done)
  );

  winner_tracker #(.OBJECTS(OBJECTS), .ZONES(ZONES), .LANES(LANES), .ACC_WIDTH(ACC_W)) u_winner (
    .clk, .rst_n,
    .clear      (start_pulse),
    .in_valid   (res_valid),
    .in_row     (res_row),
    .in_val     (res_val),
    .have_win   (),  // wo_done already marks a finished run
    .win_idx    (wo_winner),
    .win_val    (wo_win_value),
    .win_object (wo_object),
    .win_zone   (wo_zone)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sel_bank_q <= '0;
    else        sel_bank_q <= sel_bank;
  end

  assign wo_answer = signed'(ans_rdata[sel_bank_q]);
  assign wo_busy   = eng_busy;

  // status registers the host polls
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wo_done    <= 1'b0;
      wo_writes  <= '0;
      wo_sat     <= 1'b0;
      wo_dropped <= 1'b0;
    end else begin
      if (start_pulse)             wo_done <= 1'b0;
      else if (eng_done)           wo_done <= 1'b1;
      if (w_we || b_we || x_we)    wo_writes <= wo_writes + 1'b1;
      if (ld_sat)                  wo_sat <= 1'b1;
      if (start_pulse)             wo_dropped <= 1'b0;
      else if (ld_dropped)         wo_dropped <= 1'b1;
    end
  end

  // results are never reported while a classification is still running
  a_done_not_busy: assert property (@(posedge clk) disable iff (!rst_n) wo_done |-> !wo_busy);

endmodule
