// ca_ctrl: pattern pipelining and output collection for the CA array.
//
// Patterns enter on a valid/ready stream (s_valid, s_ready, s_word: one word
// per row of the input column, only the rows holding a primary input are
// used). A new pattern is sent into the array at most once every t_d clocks,
// where t_d is the column propagation delay the host computes for the mapped
// circuit, so that two successive patterns never occupy one column at the
// same time; several patterns are therefore in flight in different columns.
// pi_valid / pi_word are registered, so the array sees a pattern one clock
// after the stream handshake.
//
// On the output side the primary-output cells of the last column fire one by
// one. po_mask tells which rows hold a primary output; when every masked row
// has fired once, the collected words leave on m_valid / m_word (one pulse,
// no back-pressure) together with m_detected, high when any masked output
// cell is in the Detected state. n_issued and n_done count patterns.
//
// The pipelining rule (a period of t_d clocks between patterns) follows the
// published design; the stream interface and the collection by po_mask are
// this design's own.
module ca_ctrl
  import ca_pkg::*;
#(
  parameter int unsigned ROWS = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [15:0]          t_d,
  input  logic [ROWS-1:0]      po_mask,
  // pattern stream from the host
  input  logic                 s_valid,
  output logic                 s_ready,
  input  word_t [ROWS-1:0]     s_word,
  // array side
  output logic                 pi_valid,
  output word_t [ROWS-1:0]     pi_word,
  input  logic [ROWS-1:0]      po_valid,
  input  word_t [ROWS-1:0]     po_word,
  input  logic [ROWS-1:0]      po_detected,
  // results to the host
  output logic                 m_valid,
  output word_t [ROWS-1:0]     m_word,
  output logic                 m_detected,
  output logic [31:0]          n_issued,
  output logic [31:0]          n_done
);

  logic [15:0]     gap;        // clocks since the last issue, saturating
  logic [ROWS-1:0] seen;
  word_t [ROWS-1:0] col_word;

  assign s_ready = (gap >= t_d);

  logic [ROWS-1:0] seen_n;
  logic            complete;
  always_comb begin
    seen_n   = seen | (po_valid & po_mask);
    complete = (po_mask != '0) && (seen_n == po_mask) && ((po_valid & po_mask) != '0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gap        <= '1;
      pi_valid   <= 1'b0;
      pi_word    <= '0;
      seen       <= '0;
      col_word   <= '0;
      m_valid    <= 1'b0;
      m_word     <= '0;
      m_detected <= 1'b0;
      n_issued   <= '0;
      n_done     <= '0;
    end else begin
      pi_valid <= 1'b0;
      if (s_valid && s_ready) begin
        pi_valid <= 1'b1;
        pi_word  <= s_word;
        gap      <= 16'd1;
        n_issued <= n_issued + 32'd1;
      end else if (gap != '1) begin
        gap <= gap + 16'd1;
      end

      for (int r = 0; r < ROWS; r++)
        if (po_valid[r] && po_mask[r]) col_word[r] <= po_word[r];

      m_valid <= 1'b0;
      if (complete) begin
        seen       <= '0;
        m_valid    <= 1'b1;
        for (int r = 0; r < ROWS; r++)
          m_word[r] <= (po_valid[r] && po_mask[r]) ? po_word[r] : col_word[r];
        m_detected <= |(po_detected & po_mask);
        n_done     <= n_done + 32'd1;
      end else begin
        seen <= seen_n;
      end
    end
  end

  // a masked output must not fire twice before the pattern is complete
  a_no_double: assert property (@(posedge clk) disable iff (!rst_n)
                                (po_valid & po_mask & seen) == '0);

endmodule
