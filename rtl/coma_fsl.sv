// coma_fsl: one-word Fast Simplex Link, master (processor) to slave (COMA unit).
//
// A point-to-point, unidirectional link with FSL-style signals. The master
// writes a word with m_write when m_full is low; the slave sees s_exists with
// the word on s_data and pops it with s_read. The two sides may run from
// different clocks (the processor clock is gated and may be switched to CLKDV,
// the slave runs from the always-on clock), so the link holds one word and
// passes a write toggle and a read toggle through two-flop synchronisers.
// Timing: s_exists rises on the second slave clock edge after the write;
// m_full falls on the second master clock edge after the read.
// The one-word depth and the synchroniser are this design's choices.
module coma_fsl #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             rst,       // asynchronous, active high
  // master side
  input  logic             m_clk,
  input  logic [WIDTH-1:0] m_data,
  input  logic             m_write,
  output logic             m_full,
  // slave side
  input  logic             s_clk,
  output logic [WIDTH-1:0] s_data,
  output logic             s_exists,
  input  logic             s_read
);
  logic             wr_tgl, rd_tgl;
  logic [1:0]       wr_sync, rd_sync;
  logic [WIDTH-1:0] data_q;

  // master clock domain
  always_ff @(posedge m_clk or posedge rst) begin
    if (rst) begin
      wr_tgl  <= 1'b0;
      rd_sync <= '0;
      data_q  <= '0;
    end else begin
      rd_sync <= {rd_sync[0], rd_tgl};
      if (m_write && !m_full) begin
        data_q <= m_data;
        wr_tgl <= ~wr_tgl;
      end
    end
  end
  assign m_full = wr_tgl ^ rd_sync[1];

  // slave clock domain
  always_ff @(posedge s_clk or posedge rst) begin
    if (rst) begin
      rd_tgl  <= 1'b0;
      wr_sync <= '0;
    end else begin
      wr_sync <= {wr_sync[0], wr_tgl};
      if (s_read && s_exists) rd_tgl <= ~rd_tgl;
    end
  end
  assign s_exists = wr_sync[1] ^ rd_tgl;
  assign s_data   = data_q;
endmodule
