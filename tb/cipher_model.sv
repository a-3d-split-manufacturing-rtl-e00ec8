// cipher_model: behavioural stand-in for the encryptor/decryptor cores of the
// memory-encryption coprocessor. It is NOT a cipher: a keyed, invertible
// 32-bit scramble (xor with a key, rotate, add a constant) that lets
// testbenches check that data is transformed on the way to memory and
// restored on the way back. Combinational, like the coprocessor expects.
module cipher_model #(
  parameter logic [31:0] KEY = 32'h5A17_C3E9
) (
  input  logic [31:0] enc_in,
  output logic [31:0] enc_out,
  input  logic [31:0] dec_in,
  output logic [31:0] dec_out
);
  function automatic logic [31:0] enc(input logic [31:0] p);
    logic [31:0] t;
    t = p ^ KEY;
    t = {t[24:0], t[31:25]};
    return t + 32'h0123_4567;
  endfunction
  function automatic logic [31:0] dec(input logic [31:0] c);
    logic [31:0] t;
    t = c - 32'h0123_4567;
    t = {t[6:0], t[31:7]};
    return t ^ KEY;
  endfunction
  assign enc_out = enc(enc_in);
  assign dec_out = dec(dec_in);
endmodule
