// LTE ciphering accelerator: 128-EEA1 (SNOW 3G) and 128-EEA2 (AES-128 CTR).
//
// The two LTE confidentiality algorithms are built as separate engines that
// share one command and one data-stream interface. With each 'start' the
// caller chooses the algorithm ('alg') and gives the PDU parameters KEY,
// COUNT, BEARER, DIRECTION and LENGTH. The selected engine then turns
// ceil(LENGTH/32) 32-bit input words into output words (plaintext to
// ciphertext or back; the operation is the same). The unselected engine sees
// no start and no data, so it does not toggle.
//
// Interface: 'start' is accepted while 'busy' is low. Stream words move with
// valid/ready on both sides in the same cycle (see eea1 / eea2); out_last
// marks the final word of the PDU. NUM_AES sets the number of parallel AES
// cores in the 128-EEA2 engine (1 for LTE rates, 2 for rates well beyond).
//
// Latency and rate at the engine level: 128-EEA1 offers its first word 34
// clocks after start, then one word per clock; 128-EEA2 finishes one 128-bit
// block every 12 clocks per AES core.
//
// Both engines follow the design, as does the single-core default. Putting
// them behind one shared interface with a per-PDU algorithm select is a
// choice of this implementation.
module lte_cipher
  import lte_cipher_pkg::*;
#(
  parameter int unsigned NUM_AES = 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  alg_e           alg,
  input  cipher_params_t params,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [31:0]    in_data,
  output logic           out_valid,
  input  logic           out_ready,
  output logic [31:0]    out_data,
  output logic           out_last,
  output logic           busy
);

  alg_e        alg_q;
  logic        accept;
  logic        busy1, busy2;
  logic        in_ready1, in_ready2, out_valid1, out_valid2, out_last1, out_last2;
  logic [31:0] out_data1, out_data2;

  assign busy   = busy1 || busy2;
  assign accept = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      alg_q <= ALG_EEA1;
    else if (accept) alg_q <= alg;
  end

  eea1 u_eea1 (
    .clk, .rst_n,
    .start     (accept && alg == ALG_EEA1),
    .params,
    .in_valid  (in_valid && alg_q == ALG_EEA1),
    .in_ready  (in_ready1),
    .in_data,
    .out_valid (out_valid1),
    .out_ready (out_ready && alg_q == ALG_EEA1),
    .out_data  (out_data1),
    .out_last  (out_last1),
    .busy      (busy1)
  );

  eea2 #(.NUM_AES(NUM_AES)) u_eea2 (
    .clk, .rst_n,
    .start     (accept && alg == ALG_EEA2),
    .params,
    .in_valid  (in_valid && alg_q == ALG_EEA2),
    .in_ready  (in_ready2),
    .in_data,
    .out_valid (out_valid2),
    .out_ready (out_ready && alg_q == ALG_EEA2),
    .out_data  (out_data2),
    .out_last  (out_last2),
    .busy      (busy2)
  );

  always_comb begin
    if (alg_q == ALG_EEA1) begin
      in_ready  = in_ready1;
      out_valid = out_valid1;
      out_data  = out_data1;
      out_last  = out_last1;
    end else begin
      in_ready  = in_ready2;
      out_valid = out_valid2;
      out_data  = out_data2;
      out_last  = out_last2;
    end
  end

endmodule
