// des_subkey_mem: memory for the sixteen pre-computed DES subkeys.
//
// One 48-bit word per round. The key schedule writes it once per key
// through the synchronous write port (written on the rising clock edge
// when we is high); the round datapath reads it through an asynchronous
// read port, so the subkey for the round addressed this cycle is available
// in the same cycle. This is the shape of FPGA distributed RAM. The
// contents are not reset; des_key_schedule reports when all words are
// valid.
// Keeping pre-computed subkeys in memory follows the published
// architecture; the word organisation and ports are choices made here.
module des_subkey_mem #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 48,
  localparam int unsigned AW   = $clog2(DEPTH)
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
  end

  assign rdata = mem[raddr];
endmodule
