// 128-EEA2 ciphering engine: AES-128 in counter mode on a 32-bit data stream.
//
// The counter register (eea2_counter) supplies T_1, T_2, ... and each block
// is encrypted by an AES core (aes_core, 12 clocks per block). NUM_AES cores
// can work in parallel: blocks are issued to them in turn and their results
// taken back in the same order, so two cores double the keystream rate.
// A finished keystream block is copied into a 128-bit keystream buffer, which
// frees its core to start on the next counter block at once; the buffer is
// then handed out as four 32-bit words, most significant word first, each
// XORed with one data word. When the data side stalls, the buffer stays full
// and finished cores wait with their result.
//
// Timing with one core and a data side that never stalls: start is sampled
// at edge 0, the first core starts at edge 1 and finishes at edge 12, the
// buffer is filled at edge 13 and the first word moves in the following
// cycle; afterwards one block is finished every 12 clocks. ceil(LENGTH/128)
// blocks and ceil(LENGTH/32) words are processed; bits of the last word
// beyond LENGTH are returned as zero.
//
// Stream interface and start behaviour are the same as in eea1. The key is
// held in a register for the whole PDU, since each core start reloads it.
//
// What follows the design: counter mode with T_k feeding AES, and optional
// parallel AES cores. Choices of this implementation: the keystream buffer,
// the round-robin core order, the stream handshake and the zeroed tail.
module eea2
  import lte_cipher_pkg::*;
#(
  parameter int unsigned NUM_AES = 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
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

  localparam int unsigned IW = (NUM_AES > 1) ? $clog2(NUM_AES) : 1;

  logic               running_q;
  logic [15:0]        length_q;
  logic [127:0]       key_q;
  logic [9:0]         nblocks, issued_q;
  logic [10:0]        nwords, word_q;
  logic [IW-1:0]      issue_idx_q, cons_idx_q;
  logic [NUM_AES-1:0] slot_busy_q, core_start, core_done, core_busy;
  logic [127:0]       core_out [NUM_AES];
  logic [127:0]       t_block;
  logic               buf_valid_q;
  logic [127:0]       buf_q;
  logic [1:0]         buf_word_q;
  logic               accept, xfer, last, buf_last, buf_free, take, issue;
  logic [31:0]        ks_word, mask;

  function automatic logic [IW-1:0] next_idx(input logic [IW-1:0] i);
    return (32'(i) == NUM_AES - 1) ? '0 : i + 1'b1;
  endfunction

  assign accept  = start && !running_q;
  assign nblocks = 10'((17'(length_q) + 17'd127) >> 7);
  assign nwords  = 11'((17'(length_q) + 17'd31) >> 5);
  assign last    = (word_q == nwords - 11'd1);

  // Keystream buffer hand-out.
  assign ks_word   = buf_q[127 - 32*buf_word_q -: 32];
  assign out_valid = running_q && buf_valid_q && in_valid;
  assign in_ready  = running_q && buf_valid_q && out_ready;
  assign xfer      = out_valid && out_ready;
  assign buf_last  = (buf_word_q == 2'd3) || last;
  assign buf_free  = !buf_valid_q || (xfer && buf_last);

  // Take the oldest finished block into the buffer; issue the next counter block.
  assign take  = running_q && buf_free && slot_busy_q[cons_idx_q] && core_done[cons_idx_q];
  assign issue = running_q && (issued_q < nblocks) &&
                 (!slot_busy_q[issue_idx_q] || (take && cons_idx_q == issue_idx_q));

  always_comb begin
    core_start = '0;
    if (issue) core_start[issue_idx_q] = 1'b1;
  end

  eea2_counter u_ctr (
    .clk, .rst_n,
    .load      (accept),
    .count     (params.count),
    .bearer    (params.bearer),
    .direction (params.direction),
    .incr      (issue),
    .t_block
  );

  for (genvar i = 0; i < NUM_AES; i++) begin : g_aes
    aes_core u_aes (
      .clk, .rst_n,
      .start     (core_start[i]),
      .key       (key_q),
      .block_in  (t_block),
      .busy      (core_busy[i]),
      .out_valid (core_done[i]),
      .block_out (core_out[i])
    );
  end

  always_comb begin
    mask = '1;
    if (last && length_q[4:0] != 5'd0) mask = ~(32'hFFFF_FFFF >> length_q[4:0]);
  end

  assign out_data = (in_data ^ ks_word) & mask;
  assign out_last = last;
  assign busy     = running_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running_q   <= 1'b0;
      length_q    <= '0;
      key_q       <= '0;
      issued_q    <= '0;
      word_q      <= '0;
      issue_idx_q <= '0;
      cons_idx_q  <= '0;
      slot_busy_q <= '0;
      buf_valid_q <= 1'b0;
      buf_q       <= '0;
      buf_word_q  <= '0;
    end else if (accept) begin
      running_q   <= (params.length != 16'd0);
      length_q    <= params.length;
      key_q       <= params.key;
      issued_q    <= '0;
      word_q      <= '0;
      issue_idx_q <= '0;
      cons_idx_q  <= '0;
      slot_busy_q <= '0;
      buf_valid_q <= 1'b0;
      buf_word_q  <= '0;
    end else begin
      if (take) begin
        slot_busy_q[cons_idx_q] <= 1'b0;
        cons_idx_q              <= next_idx(cons_idx_q);
      end
      if (issue) begin
        slot_busy_q[issue_idx_q] <= 1'b1;
        issue_idx_q              <= next_idx(issue_idx_q);
        issued_q                 <= issued_q + 10'd1;
      end
      if (take) begin
        buf_q       <= core_out[cons_idx_q];
        buf_valid_q <= 1'b1;
        buf_word_q  <= '0;
      end else if (xfer) begin
        if (buf_last) buf_valid_q <= 1'b0;
        buf_word_q <= buf_word_q + 2'd1;
      end
      if (xfer) begin
        word_q <= word_q + 11'd1;
        if (last) running_q <= 1'b0;
      end
    end
  end

  // The buffer is only refilled when it is empty or being emptied.
  a_take_when_free: assert property (@(posedge clk) disable iff (!rst_n) take |-> buf_free);
  // A counter block is only issued to a core that is not computing.
  a_issue_to_free_core: assert property (@(posedge clk) disable iff (!rst_n)
                                         (core_start & core_busy) == '0);

endmodule
