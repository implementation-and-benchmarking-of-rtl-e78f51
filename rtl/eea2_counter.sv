// 128-EEA2 counter block register.
//
// Holds the AES input block T_k of counter mode. 'load' sets the first block
//   T_1 = COUNT[31:0] | BEARER[4:0] | DIRECTION | 26 zero bits | 64 zero bits
// (most significant bits first), and each 'incr' forms T_k = T_(k-1) + 1 with
// the standard incrementing function applied to the low 64 bits (modulo
// 2^64), leaving the upper 64 bits unchanged. Both act at the rising edge,
// load first. A PDU needs at most 512 blocks, so the low half never wraps in
// practice.
//
// T_1 and the +1 step follow the design; applying the increment to the low
// 64 bits is taken from the 128-EEA2 specification.
module eea2_counter (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [31:0]  count,
  input  logic [4:0]   bearer,
  input  logic         direction,
  input  logic         incr,
  output logic [127:0] t_block
);

  logic [63:0] hi_q, lo_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hi_q <= '0;
      lo_q <= '0;
    end else if (load) begin
      hi_q <= {count, bearer, direction, 26'h0};
      lo_q <= '0;
    end else if (incr) begin
      lo_q <= lo_q + 64'd1;
    end
  end

  assign t_block = {hi_q, lo_q};

endmodule
