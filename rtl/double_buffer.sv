// double_buffer: a two-bank (ping-pong) on-chip buffer.
//
// Used for all three ICAN buffers. One side fills a bank while the other
// side drains the other bank, so external-memory transfers overlap with
// computation. Each bank is a simple dual-port memory of DEPTH words of
// WIDTH bits (one write port, one read port, read latency one cycle).
//   fill side : owns bank fill_sel while that bank is empty (fill_ready=1);
//               may write it and read it back (the output buffer's
//               read-modify-write); fill_commit marks it full and moves on
//               to the other bank.
//   drain side: owns bank drain_sel while that bank is full (drain_valid=1);
//               reads it; drain_release marks it empty and moves on.
// The input and weight buffers are filled from the bus and drained by the
// compute engine; the output buffer is filled by the compute engine and
// drained to the bus. A side that finds its flag low must wait: this is the
// stall that holds the compute array until a transfer has completed.
// Double buffering and the word widths follow the document; the handshake is
// this design's own. Wide buffers are one logical memory here; a synthesis
// flow splits them into several physical SRAM banks of the same depth.
module double_buffer #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // fill side
  output logic             fill_ready,
  input  logic             fill_wr_en,
  input  logic [AW-1:0]    fill_wr_addr,
  input  logic [WIDTH-1:0] fill_wr_data,
  input  logic             fill_rd_en,
  input  logic [AW-1:0]    fill_rd_addr,
  output logic [WIDTH-1:0] fill_rd_data,
  input  logic             fill_commit,
  // drain side
  output logic             drain_valid,
  input  logic             drain_rd_en,
  input  logic [AW-1:0]    drain_rd_addr,
  output logic [WIDTH-1:0] drain_rd_data,
  input  logic             drain_release
);

  logic [1:0]       full;
  logic             fill_sel, drain_sel;
  logic [WIDTH-1:0] rd_q [2];

  assign fill_ready  = !full[fill_sel];
  assign drain_valid = full[drain_sel];

  for (genvar b = 0; b < 2; b++) begin : g_bank
    logic [WIDTH-1:0] mem [DEPTH];
    logic             rd_en;
    logic [AW-1:0]    rd_addr;

    always_comb begin
      if (fill_sel == 1'(b) && fill_rd_en) begin
        rd_en   = 1'b1;
        rd_addr = fill_rd_addr;
      end else begin
        rd_en   = drain_sel == 1'(b) && drain_rd_en;
        rd_addr = drain_rd_addr;
      end
    end

    always_ff @(posedge clk) begin
      if (fill_wr_en && fill_sel == 1'(b)) mem[fill_wr_addr] <= fill_wr_data;
      if (rd_en) rd_q[b] <= mem[rd_addr];
    end
  end

  assign fill_rd_data  = rd_q[fill_sel];
  assign drain_rd_data = rd_q[drain_sel];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full      <= '0;
      fill_sel  <= 1'b0;
      drain_sel <= 1'b0;
    end else begin
      if (fill_commit) begin
        full[fill_sel] <= 1'b1;
        fill_sel       <= !fill_sel;
      end
      if (drain_release) begin
        full[drain_sel] <= 1'b0;
        drain_sel       <= !drain_sel;
      end
    end
  end

  // Handshake rules
  a_fill_owned:  assert property (@(posedge clk) disable iff (!rst_n)
                   (fill_wr_en || fill_rd_en || fill_commit) |-> fill_ready);
  a_drain_owned: assert property (@(posedge clk) disable iff (!rst_n)
                   (drain_rd_en || drain_release) |-> drain_valid);

endmodule
