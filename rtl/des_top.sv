// des_top: compact iterative DES encryption/decryption core.
//
// One DES round is built once and used sixteen times. The 64-bit input
// block passes IP, the two halves circulate through the half registers and
// the combinational round (expansion E, subkey XOR, eight S-boxes in
// parallel, permutation P, XOR with the left half), and after round 16 the
// swapped halves pass IP-1 into the output register. Subkeys are computed
// once per key by a sequential key schedule and kept in a 16 x 48-bit
// memory; decryption reads that memory in reverse order.
//
// Interface and timing:
//  - key_load (one cycle) starts the key schedule; 17 cycles later
//    key_ready is high. From the key_load cycle until then the core is
//    held. Load a key between blocks: a block in flight when the key
//    changes finishes with a mix of old and new subkeys.
//  - While ce_n is low (and key_ready is high) the core runs. din and
//    decrypt are sampled at every edge where din_taken is high, once per
//    16 cycles. The result appears in dout, with dout_valid high for one
//    cycle, 16 edges after the sampling edge, and stays until the next
//    result. ce_n high freezes the core in place.
//  - rst_n is an asynchronous, active-low reset of the control state.
//  - Pipelined engine (pipe_* ports): beside the iterative core sits a
//    fully unrolled engine of sixteen round stages that shares the key
//    schedule and the chip enable. A block on pipe_din is taken at each
//    edge where pipe_din_taken is high (pipe_din_valid, ce_n low, key
//    ready); its result appears on pipe_dout with pipe_dout_valid high 17
//    enabled edges later, and a new block can enter on every clock.
// The pins CE, CLK, IN and OUT are those of the DES chip described for
// this architecture; key loading, mode, reset, handshake pins and the
// separate ports of the pipelined engine are additions of this
// implementation.
module des_top
  import des_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   ce_n,
  input  block_t din,
  input  logic   decrypt,
  output logic   din_taken,
  input  block_t key,
  input  logic   key_load,
  output logic   key_ready,
  output block_t dout,
  output logic   dout_valid,
  input  block_t pipe_din,
  input  logic   pipe_decrypt,
  input  logic   pipe_din_valid,
  output logic   pipe_din_taken,
  output block_t pipe_dout,
  output logic   pipe_dout_valid
);
  logic    ks_busy, ks_we, load, advance, last;
  round_t  ks_waddr, key_addr;
  subkey_t ks_wdata, subkey;

  des_key_schedule u_ks (
    .clk, .rst_n, .key, .start(key_load),
    .busy(ks_busy), .ready(key_ready), .we(ks_we), .waddr(ks_waddr), .wdata(ks_wdata));

  des_subkey_mem u_mem (
    .clk, .we(ks_we), .waddr(ks_waddr), .wdata(ks_wdata), .raddr(key_addr), .rdata(subkey));

  des_ctrl u_ctrl (
    .clk, .rst_n, .ce_n, .hold(key_load || ks_busy || !key_ready), .decrypt,
    .load, .advance, .last, .key_addr, .dout_valid);

  des_datapath u_dp (
    .clk, .din, .load, .advance, .last, .subkey, .dout);

  assign din_taken = load;

  logic pipe_en, pipe_accept, pipe_out_valid;

  assign pipe_en        = !ce_n;
  assign pipe_accept    = pipe_din_valid && key_ready && !key_load;
  assign pipe_din_taken = pipe_en && pipe_accept;

  des_pipe_core u_pipe (
    .clk, .rst_n, .en(pipe_en), .in_valid(pipe_accept), .din(pipe_din), .decrypt(pipe_decrypt),
    .key_we(ks_we), .key_waddr(ks_waddr), .key_wdata(ks_wdata),
    .out_valid(pipe_out_valid), .dout(pipe_dout));

  // One strobe per result: the engine holds its output while frozen.
  assign pipe_dout_valid = pipe_out_valid && pipe_en;
endmodule
