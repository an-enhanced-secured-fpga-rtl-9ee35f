// des_pipe_core: fully pipelined DES engine, sixteen round stages in a row.
//
// The unrolled counterpart of the iterative core: every round has its own
// f function and registers, so a new block can enter on every clock. An
// input register takes IP(din) (edge 1), the sixteen des_pipe_stage
// instances apply rounds 1..16 (edges 2..17), and IP-1 of the swapped
// halves of the last stage drives dout. The first result thus appears 17
// clock edges after its block entered, and one result follows per clock
// after that.
//
// All sixteen subkeys are needed at once, so they are kept in a register
// bank written through the same port the key schedule uses for the subkey
// memory (we, waddr, wdata). Each block carries its own mode bit; every
// stage picks its encryption or decryption subkey from it. en low freezes
// the whole pipeline. A block is taken on an enabled edge with in_valid
// high; out_valid marks the cycle its result is on dout.
// The 17-clock first result and one result per clock follow the published
// pipelined figures; the stage split, subkey bank and per-block mode bit
// are choices made here.
module des_pipe_core
  import des_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  logic    in_valid,
  input  block_t  din,
  input  logic    decrypt,
  input  logic    key_we,
  input  round_t  key_waddr,
  input  subkey_t key_wdata,
  output logic    out_valid,
  output block_t  dout
);
  subkey_t keys [16];
  block_t  ip_out;
  logic    v   [17];
  logic    dec [17];
  half_t   l   [17];
  half_t   r   [17];

  always_ff @(posedge clk) begin
    if (key_we) keys[key_waddr] <= key_wdata;
  end

  // Input register: IP of the incoming block.
  des_ip u_ip (.x(din), .y(ip_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  v[0] <= 1'b0;
    else if (en) v[0] <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      dec[0] <= decrypt;
      l[0]   <= ip_out[63:32];
      r[0]   <= ip_out[31:0];
    end
  end

  for (genvar i = 0; i < 16; i++) begin : g_stage
    des_pipe_stage #(.ROUND(i)) u_stage (
      .clk, .rst_n, .en,
      .in_valid(v[i]), .in_dec(dec[i]), .in_l(l[i]), .in_r(r[i]),
      .k_enc(keys[i]), .k_dec(keys[15-i]),
      .out_valid(v[i+1]), .out_dec(dec[i+1]), .out_l(l[i+1]), .out_r(r[i+1]));
  end

  des_fp u_fp (.x({r[16], l[16]}), .y(dout));
  assign out_valid = v[16];
endmodule
