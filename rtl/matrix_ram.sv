// matrix_ram -- one-dimensional array with one write and one read port.
//
// Every matrix of the recogniser is kept as one-dimensional arrays of this
// kind: the weight matrix (60 x 256, 15360 words, flat index n*256 + j), the
// 60 biases, the 256-bit input vector (WIDTH = 1) and the 60 neuron answers.
// For parallel evaluation the weights, biases and answers are split into one
// bank per processing lane (see neuron_engine); each bank is one instance.
// Keeping the matrices one-dimensional and addressed by a single index is
// the storage scheme of the design description; the synchronous read (data
// one cycle after the address) is this implementation's choice, so that the
// arrays map onto block or distributed RAM.
//
// Timing: a write with we=1 takes effect at the clock edge; rdata shows the
// word at raddr as it stood before that edge, one cycle after raddr.
// The contents are not reset; every word is loaded before it is read.
module matrix_ram #(
  parameter int unsigned WIDTH = 16,     // bits per word
  parameter int unsigned DEPTH = 256,    // words
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
