// AES-128 KEY register with on-the-fly key expansion, one round key per clock.
//
// The register holds the current round key as four words w0..w3 (w0 in bits
// 127:96). One step computes the next round key in a chain of four stages:
// the first stage rotates w3 by one byte, substitutes it with four one-hot
// Rijndael S-boxes and adds the round constant, giving t; then
// w0' = w0 ^ t, w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2'. Only the first
// stage needs S-boxes. The round constant register starts at 0x01 and is
// multiplied by x (mod 0x11B) on each step.
//
// Interface: 'load' writes the cipher key and resets the round constant,
// otherwise 'step' advances to the next round key; both at the rising edge,
// load first. round_key is the register output.
//
// The four-stage chain with S-boxes only in the first stage follows the
// design. The round-constant register is a choice of this implementation.
module aes_key_expansion
  import lte_cipher_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [127:0] key_in,
  input  logic         step,
  output logic [127:0] round_key
);

  logic [127:0] key_q, key_next;
  logic [7:0]   rcon_q;
  logic [31:0]  w3_rot, w3_sub;
  logic [31:0]  w0, w1, w2, w3, t, n0, n1, n2, n3;

  assign {w0, w1, w2, w3} = key_q;
  assign w3_rot = {w3[23:0], w3[31:24]};

  for (genvar i = 0; i < 4; i++) begin : g_sr
    onehot_sbox #(.KIND(SBOX_SR)) u_sr (.x(w3_rot[8*i +: 8]), .y(w3_sub[8*i +: 8]));
  end

  always_comb begin
    t  = w3_sub ^ {rcon_q, 24'h0};
    n0 = w0 ^ t;
    n1 = w1 ^ n0;
    n2 = w2 ^ n1;
    n3 = w3 ^ n2;
    key_next = {n0, n1, n2, n3};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_q  <= '0;
      rcon_q <= 8'h01;
    end else if (load) begin
      key_q  <= key_in;
      rcon_q <= 8'h01;
    end else if (step) begin
      key_q  <= key_next;
      rcon_q <= mulx(rcon_q, 8'h1B);
    end
  end

  assign round_key = key_q;

endmodule
