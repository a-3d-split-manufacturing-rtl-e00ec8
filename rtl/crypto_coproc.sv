// crypto_coproc: memory-encryption coprocessor control on the control plane.
//
// Gives the processor transparent memory encryption without changing it. The
// memory address is tapped and compared with a predetermined data region
// (DATA_BASE, equality on the address bits above the region offset): words in
// that region are data, everything else is taken to be instructions.
//   * a write to the data region: the write data is tapped, sent through the
//     encryptor and the ciphertext overrides the data written to memory;
//   * a read from the data region: the raw memory word is tapped, sent through
//     the decryptor and the plaintext overrides the data entering the
//     processor's instruction/data registers;
//   * instruction fetches and accesses outside the region pass unchanged.
// The encryptor and decryptor cores are outside this module (enc_*/dec_*
// ports), combinational from the processor's point of view: the result must be
// valid in the same cycle as the access. The region base 0x00400100 is the
// address printed for the comparator; the region size (REGION_LSB) and the
// equality-on-upper-bits reading are this design's choices.
module crypto_coproc
  import split3d_pkg::*;
#(
  parameter logic [31:0] DATA_BASE  = 32'h0040_0100,
  parameter int unsigned REGION_LSB = 8
) (
  // posts to/from the processor
  output logic        tap_en,
  input  mips_taps_t  taps,
  output mips_ovr_t   ovr,
  // cipher cores
  output logic [31:0] enc_in,
  input  logic [31:0] enc_out,
  output logic [31:0] dec_in,
  input  logic [31:0] dec_out,
  // observation
  output logic        ev_encrypt,
  output logic        ev_decrypt
);
  logic is_data;
  assign is_data = (taps.addr[31:REGION_LSB] == DATA_BASE[31:REGION_LSB]);

  assign enc_in = taps.wd;
  assign dec_in = taps.rd;

  always_comb begin
    ovr      = MIPS_OVR_NATIVE;
    ovr.wd_n = !is_data;
    ovr.wd_v = enc_out;
    ovr.rd_n = !is_data;
    ovr.rd_v = dec_out;
  end
  assign tap_en = 1'b1;

  assign ev_encrypt = is_data && taps.memwrite;
  assign ev_decrypt = is_data && !taps.memwrite;
endmodule
