// aes_state_masker: initial sharing of an AES plaintext with only two random bits.
//
// All sixteen bytes are masked with the same byte mask built from m0 and m1:
//   m_B = {m1, m0^m1, m0^m1, m0, m0, m1, m0, m1}     (listed from bit 7 down to bit 0)
// so that adjacent S-box inputs never see two equal masks in one byte. share1 carries m_B in every
// byte and share0 the plaintext XOR share1; share0 ^ share1 restores the plaintext. The byte mask
// is the published one; placing its first element at bit 7 is this design's reading, and the
// masked AES rounds that would consume the shares are not part of this module.
//
// Purely combinational.
module aes_state_masker #(
  parameter int unsigned N_BYTES = 16
) (
  input  logic [8*N_BYTES-1:0] plaintext,
  input  logic                 m0,
  input  logic                 m1,
  output logic [8*N_BYTES-1:0] share0,
  output logic [8*N_BYTES-1:0] share1
);

  logic [7:0] mask_byte;

  always_comb begin
    mask_byte = {m1, m0 ^ m1, m0 ^ m1, m0, m0, m1, m0, m1};
    share1    = {N_BYTES{mask_byte}};
    share0    = plaintext ^ share1;
  end

endmodule
