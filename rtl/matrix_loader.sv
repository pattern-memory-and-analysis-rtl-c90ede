// matrix_loader -- writes host-sent values into the one-dimensional arrays.
//
// The host sends the matrices one value at a time, running the loop itself:
// for each value it sets the target array, the iteration number (the index in
// the flat array), the unsigned magnitude and the sign flag on its wires, and
// then signals that the value is ready. This block turns the magnitude and
// sign into two's complement (sign_mag_to_twos) and issues one write into the
// weight, bias or input array at that index. That transfer scheme -- index in
// a wire, host-side loop, sign flag, flat arrays -- follows the design
// description.
//
// The weights and biases are split into one bank per processing lane (see
// neuron_engine). The loader maps the host's flat index onto a bank and a
// word: weight index i is neuron n = i / SAMPLES, sample j = i % SAMPLES,
// bank n / ROWS, word (n % ROWS)*SAMPLES + j; bias index n goes to bank
// n / ROWS, word n % ROWS (ROWS = NEURONS / LANES).
//
// This implementation's choices:
//   * "ready" is a toggle: every change of `strobe` is one transfer, so the
//     host flips one bit per value and needs no second update to clear it.
//   * An input-vector transfer stores 1 when the magnitude is nonzero.
//   * A transfer whose index lies outside its array, aimed at TGT_NONE, or
//     arriving while `hold` is high (the engine is computing) is ignored and
//     reported by a one-cycle `dropped` pulse.
//
// Timing: the write strobes, address and data are registered; they are valid
// for exactly one cycle, one clock after the cycle in which `strobe` changed.
module matrix_loader
  import echo_nn_pkg::*;
#(
  parameter int unsigned WIRE_WIDTH = WIRE_W,
  parameter int unsigned VAL_WIDTH  = VALUE_W,
  parameter int unsigned NEURONS    = N_NEURONS,
  parameter int unsigned SAMPLES    = N_SAMPLES,
  parameter int unsigned LANES      = N_LANES,
  localparam int unsigned W_DEPTH   = NEURONS * SAMPLES,
  localparam int unsigned ROWS      = NEURONS / LANES,
  localparam int unsigned BANK_D    = ROWS * SAMPLES,
  localparam int unsigned LB_W      = (LANES > 1) ? $clog2(LANES) : 1,
  localparam int unsigned WA_W      = (BANK_D > 1) ? $clog2(BANK_D) : 1,
  localparam int unsigned RW        = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned XA_W      = (SAMPLES > 1) ? $clog2(SAMPLES) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // host wires
  input  target_e                     target,   // array the value is for
  input  logic [WIRE_WIDTH-1:0]       index,    // iteration number = flat index
  input  logic [WIRE_WIDTH-1:0]       mag,      // unsigned magnitude (value x 1000)
  input  logic                        neg,      // sign flag
  input  logic                        strobe,   // toggles once per value
  input  logic                        hold,     // ignore transfers (engine busy)
  // array write ports (bank = lane, addr = word inside the bank)
  output logic                        w_we,
  output logic [LB_W-1:0]             w_bank,
  output logic [WA_W-1:0]             w_addr,
  output logic signed [VAL_WIDTH-1:0] w_data,
  output logic                        b_we,
  output logic [LB_W-1:0]             b_bank,
  output logic [RW-1:0]               b_addr,
  output logic signed [VAL_WIDTH-1:0] b_data,
  output logic                        x_we,
  output logic [XA_W-1:0]             x_addr,
  output logic                        x_data,
  // status
  output logic                        sat,      // pulse: magnitude was clipped
  output logic                        dropped   // pulse: transfer ignored
);

  logic                        strobe_q;
  logic                        event_now;
  logic signed [VAL_WIDTH-1:0] value;
  logic                        value_sat;
  logic                        in_range;
  int unsigned                 w_n, w_j, w_bank_n, w_local, b_bank_n, b_row;

  sign_mag_to_twos #(.MAG_W(WIRE_WIDTH), .OUT_W(VAL_WIDTH)) u_conv (
    .mag (mag),
    .neg (neg),
    .out (value),
    .sat (value_sat)
  );

  assign event_now = (strobe != strobe_q);

  // flat index -> (lane bank, word in bank); lane l holds neurons
  // l*ROWS .. l*ROWS+ROWS-1, row after row
  always_comb begin
    w_n      = 32'(index) / SAMPLES;
    w_j      = 32'(index) % SAMPLES;
    w_bank_n = w_n / ROWS;
    w_local  = (w_n % ROWS) * SAMPLES + w_j;
    b_bank_n = 32'(index) / ROWS;
    b_row    = 32'(index) % ROWS;
  end

  always_comb begin
    unique case (target)
      TGT_WEIGHT: in_range = (32'(index) < W_DEPTH);
      TGT_BIAS:   in_range = (32'(index) < NEURONS);
      TGT_INPUT:  in_range = (32'(index) < SAMPLES);
      default:    in_range = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      strobe_q <= 1'b0;
      w_we     <= 1'b0;
      b_we     <= 1'b0;
      x_we     <= 1'b0;
      w_bank   <= '0;
      w_addr   <= '0;
      b_bank   <= '0;
      b_addr   <= '0;
      x_addr   <= '0;
      w_data   <= '0;
      b_data   <= '0;
      x_data   <= 1'b0;
      sat      <= 1'b0;
      dropped  <= 1'b0;
    end else begin
      strobe_q <= strobe;
      w_we     <= 1'b0;
      b_we     <= 1'b0;
      x_we     <= 1'b0;
      sat      <= 1'b0;
      dropped  <= 1'b0;
      if (event_now) begin
        if (hold || !in_range) begin
          dropped <= 1'b1;
        end else begin
          unique case (target)
            TGT_WEIGHT: begin
              w_we   <= 1'b1;
              w_bank <= LB_W'(w_bank_n);
              w_addr <= WA_W'(w_local);
              w_data <= value;
              sat    <= value_sat;
            end
            TGT_BIAS: begin
              b_we   <= 1'b1;
              b_bank <= LB_W'(b_bank_n);
              b_addr <= RW'(b_row);
              b_data <= value;
              sat    <= value_sat;
            end
            TGT_INPUT: begin
              x_we   <= 1'b1;
              x_addr <= XA_W'(index);
              x_data <= (mag != '0);
            end
            default: ;
          endcase
        end
      end
    end
  end

  // one transfer writes at most one array, and an ignored one writes none
  a_one_write:    assert property (@(posedge clk) disable iff (!rst_n) $onehot0({w_we, b_we, x_we}));
  a_drop_no_write: assert property (@(posedge clk) disable iff (!rst_n)
                                    dropped |-> !(w_we || b_we || x_we));

endmodule
