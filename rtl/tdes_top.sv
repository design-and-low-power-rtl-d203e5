// tdes_top: Triple-DES (TDEA) built from three single-DES cores in series.
//
// Encryption runs the block through DES-encrypt with key1, DES-decrypt with
// key2 and DES-encrypt with key3 (EDE). Decryption undoes this: decrypt with
// key3, encrypt with key2, decrypt with key1. With key1 = key2 = key3 the
// first two steps cancel and the result is single DES; with key3 = key1 it is
// two-key Triple-DES. The three cores are full 16-round des_core instances.
//
// Interface: clk, rst (synchronous, active high), enable, encrypt (1 =
// encrypt, 0 = decrypt), key1..key3 and data_in in; data_out and out_valid
// out. These are the chip's pins (three 64-bit keys, 64-bit input and output,
// clock, enable, encrypt, reset) plus out_valid, which is this
// implementation's addition.
// Timing: each core has one output register, so the cipher is a three-stage
// pipeline: a block taken with enable high at rising edge t appears on
// data_out, with out_valid high for one cycle, right after edge t+2, three
// clock cycles later. One block per cycle is accepted. The
// encrypt bit travels with the block, so the direction may change from one
// block to the next; key1..key3 are not pipelined and must be held while a
// block is in flight (three cycles).
module tdes_top
  import des_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   enable,
  input  logic   encrypt,
  input  block_t key1,
  input  block_t key2,
  input  block_t key3,
  input  block_t data_in,
  output block_t data_out,
  output logic   out_valid
);

  block_t s1_data, s2_data;
  logic   s1_valid, s2_valid;
  logic   s1_encrypt, s2_encrypt;   // direction of the block held in each stage

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_encrypt <= 1'b1;
      s2_encrypt <= 1'b1;
    end else begin
      if (enable)   s1_encrypt <= encrypt;
      if (s1_valid) s2_encrypt <= s1_encrypt;
    end
  end

  // Stage 1: E(key1) when encrypting, D(key3) when decrypting.
  des_core u_des1 (
    .clk, .rst, .enable,
    .encrypt (encrypt),
    .key     (encrypt ? key1 : key3),
    .data_in (data_in),
    .data_out(s1_data),
    .valid   (s1_valid)
  );

  // Stage 2: always the opposite direction, with key2.
  des_core u_des2 (
    .clk, .rst,
    .enable  (s1_valid),
    .encrypt (!s1_encrypt),
    .key     (key2),
    .data_in (s1_data),
    .data_out(s2_data),
    .valid   (s2_valid)
  );

  // Stage 3: E(key3) when encrypting, D(key1) when decrypting.
  des_core u_des3 (
    .clk, .rst,
    .enable  (s2_valid),
    .encrypt (s2_encrypt),
    .key     (s2_encrypt ? key3 : key1),
    .data_in (s2_data),
    .data_out(data_out),
    .valid   (out_valid)
  );

  // A block accepted now leaves the pipeline exactly three cycles later.
  a_latency : assert property (@(posedge clk) disable iff (rst)
    enable |=> s1_valid ##1 s2_valid ##1 out_valid);

endmodule
