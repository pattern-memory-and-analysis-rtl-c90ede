// winner_tracker -- winner-take-all over the neuron outputs, and object decode.
//
// The neuron with the highest output "fires" and names what the sonar sees.
// The 60 neurons form four groups of 15: neurons 0-14 detect object A,
// 15-29 object B, 30-44 object C and 45-59 object D, and inside a group each
// neuron covers one distance zone (about 9.4 cm, 15 zones over about 141 cm).
// Those rules follow the design description. How the maximum is found is
// this implementation's choice: the block takes the neuron engine's results
// as they come out (LANES neurons per pulse, lane l carrying neuron
// l*ROWS + in_row), finds the largest of each pulse with a chain of
// comparators, and keeps the largest so far in a register, so the winner is
// known as soon as the last result is out. On equal values the lower neuron
// number wins.
//
// Interface: `clear` forgets the current winner. Each in_valid pulse offers
// one row of results. win_idx/win_val are registered and change one clock
// after the pulse that beat them; win_object (0 = A .. 3 = D) and win_zone
// (0 = nearest .. ZONES-1) are decoded from win_idx without delay. have_win
// is 1 once at least one pulse has arrived since `clear`.
module winner_tracker
  import echo_nn_pkg::*;
#(
  parameter int unsigned OBJECTS   = N_OBJECTS,
  parameter int unsigned ZONES     = ZONES_PER_OBJECT,
  parameter int unsigned LANES     = N_LANES,
  parameter int unsigned ACC_WIDTH = VALUE_W + $clog2(N_SAMPLES) + 1,
  localparam int unsigned NEURONS  = OBJECTS * ZONES,
  localparam int unsigned ROWS     = NEURONS / LANES,
  localparam int unsigned RW       = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned NA_W     = (NEURONS > 1) ? $clog2(NEURONS) : 1,
  localparam int unsigned OB_W     = (OBJECTS > 1) ? $clog2(OBJECTS) : 1,
  localparam int unsigned ZN_W     = (ZONES > 1) ? $clog2(ZONES) : 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            clear,
  input  logic                            in_valid,
  input  logic [RW-1:0]                   in_row,
  input  logic [LANES-1:0][ACC_WIDTH-1:0] in_val,
  output logic                            have_win,
  output logic [NA_W-1:0]                 win_idx,
  output logic signed [ACC_WIDTH-1:0]     win_val,
  output logic [OB_W-1:0]                 win_object,
  output logic [ZN_W-1:0]                 win_zone
);

  logic signed [ACC_WIDTH-1:0] row_val;   // best of this pulse
  logic [NA_W-1:0]             row_idx;

  // lane 0 first; a later lane (higher neuron number) must be strictly larger
  always_comb begin
    row_val = signed'(in_val[0]);
    row_idx = NA_W'(in_row);
    for (int l = 1; l < LANES; l++) begin
      if (signed'(in_val[l]) > row_val) begin
        row_val = signed'(in_val[l]);
        row_idx = NA_W'(l * ROWS) + NA_W'(in_row);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_win <= 1'b0;
      win_idx  <= '0;
      win_val  <= '0;
    end else if (clear) begin
      have_win <= 1'b0;
      win_idx  <= '0;
      win_val  <= '0;
    end else if (in_valid && (!have_win || row_val > win_val ||
                              (row_val == win_val && row_idx < win_idx))) begin
      have_win <= 1'b1;
      win_idx  <= row_idx;
      win_val  <= row_val;
    end
  end

  always_comb begin
    win_object = OB_W'(32'(win_idx) / ZONES);
    win_zone   = ZN_W'(32'(win_idx) % ZONES);
  end

endmodule
