// read_controller: fills the shape adapter from the input buffer, one
// reuse-network window at a time.
//
// For one input data tile it walks the windows in the order the compute
// engine consumes them (Fig. 2.7 order: m1, r1, c1, z1). A window is the
// ROWS_L x COLS_L block of input pixels that compute-tile position (r1, c1)
// of input map z1 needs: ROWS_L = (TR-1)*S + K, COLS_L = (TC-1)*S + K. For
// every column j of the window it reads the buffer words that hold tile rows
// ro .. ro+ROWS_L-1 (ro = r1i*TR*S) and drives the adapter's lane selection
// (row_off) and zero-padding coordinates. When the window is complete it
// raises win_ready and waits for win_take (the cycle the reuse network copies
// the adapter), then starts the next window, so filling overlaps the K^2
// compute cycles of the previous window.
// Input-buffer layout, word address (z1i*XT + col)*WPC + wr, where XT is the
// tile width in columns and WPC the words per tile column: this design's
// choice, consistent with the buffer depth D_Z*ceil(Y'/(TR*TC))*X'.
// Timing: buffer read latency one cycle; adapter controls are registered to
// line up with the read data. A window of n reads is ready n + 2 cycles
// after start or after the previous window was taken.
module read_controller #(
  parameter int unsigned TR = ican_pkg::DEF_TR,
  parameter int unsigned TC = ican_pkg::DEF_TC,
  parameter int unsigned W  = TR*TC,
  parameter int unsigned AW = 11
) (
  input  logic               clk,
  input  logic               rst_n,
  // tile description, sampled at start
  input  logic               start,
  input  logic [15:0]        m_cnt,      // m1 groups in the tile
  input  logic [15:0]        r_cnt,      // r1 groups
  input  logic [15:0]        c_cnt,      // c1 groups
  input  logic [15:0]        z_cnt,      // input maps in the tile
  input  logic signed [17:0] tile_row0,  // input-map row of tile row 0
  input  logic signed [17:0] tile_col0,  // input-map column of tile column 0
  // layer constants, stable during a layer
  input  logic [15:0]        rows_l,     // (TR-1)*S + K
  input  logic [15:0]        cols_l,     // (TC-1)*S + K
  input  logic [15:0]        rstep,      // TR*S
  input  logic [15:0]        cstep,      // TC*S
  input  logic [15:0]        xt,         // tile width in columns
  input  logic [15:0]        wpc,        // words per tile column
  // input buffer read port
  output logic               ibuf_rd_en,
  output logic [AW-1:0]      ibuf_rd_addr,
  // shape adapter control (aligned with the read data)
  output logic               ad_wr_en,
  output logic [15:0]        ad_col,
  output logic signed [17:0] ad_row_off,
  output logic signed [17:0] ad_img_row0,
  output logic signed [17:0] ad_img_col,
  // handshake with the compute controller
  output logic               win_ready,
  input  logic               win_take,
  output logic               busy
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_FLUSH, S_FULL} state_t;
  state_t st;

  logic [15:0] m_q, r_q, c_q, z_q;             // tile counts
  logic [15:0] mi, ri, ci, zi;                 // window indices
  logic [15:0] j, wr, w_hi;
  logic [15:0] ro;                             // ri * rstep
  logic [15:0] co;                             // ci * cstep
  logic signed [17:0] trow0, tcol0;

  // tile row of the next window's network row 0
  logic [15:0] ro_next;
  always_comb begin
    ro_next = ro;
    if (zi + 16'd1 >= z_q && ci + 16'd1 >= c_q)
      ro_next = (ri + 16'd1 < r_q) ? ro + rstep : '0;
  end

  logic [31:0] addr_full;
  assign addr_full = ((32'(zi) * 32'(xt)) + 32'(co) + 32'(j)) * 32'(wpc) + 32'(wr);

  assign busy         = (st != S_IDLE);
  assign ibuf_rd_en   = (st == S_READ);
  assign ibuf_rd_addr = addr_full[AW-1:0];
  assign win_ready = (st == S_FULL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      {m_q, r_q, c_q, z_q, mi, ri, ci, zi, j, wr, w_hi, ro, co} <= '0;
      trow0 <= '0; tcol0 <= '0;
      ad_wr_en <= 1'b0; ad_col <= '0; ad_row_off <= '0; ad_img_row0 <= '0; ad_img_col <= '0;
    end else begin
      ad_wr_en <= ibuf_rd_en;
      unique case (st)
        S_IDLE: if (start) begin
          m_q <= m_cnt; r_q <= r_cnt; c_q <= c_cnt; z_q <= z_cnt;
          trow0 <= tile_row0; tcol0 <= tile_col0;
          {mi, ri, ci, zi, ro, co, j, wr} <= '0;
          w_hi <= (rows_l - 16'd1) / 16'(W);
          st <= S_READ;
        end
        S_READ: begin
          ad_col       <= j;
          ad_row_off   <= $signed({2'b00, ro}) - $signed({2'b00, wr}) * $signed(18'(W));
          ad_img_row0  <= trow0 + $signed({2'b00, ro});
          ad_img_col   <= tcol0 + $signed({2'b00, co}) + $signed({2'b00, j});
          if (wr != w_hi) begin
            wr <= wr + 16'd1;
          end else begin
            wr <= ro / 16'(W);
            if (j + 16'd1 < cols_l) j <= j + 16'd1;
            else                    st <= S_FLUSH;
          end
        end
        S_FLUSH: st <= S_FULL;   // last word lands in the adapter
        S_FULL: if (win_take) begin
          // advance z1 -> c1 -> r1 -> m1 and start reading the next window
          st   <= S_READ;
          j    <= '0;
          wr   <= ro_next / 16'(W);
          w_hi <= (ro_next + rows_l - 16'd1) / 16'(W);
          ro   <= ro_next;
          if (zi + 16'd1 < z_q) begin
            zi <= zi + 16'd1;
          end else begin
            zi <= '0;
            if (ci + 16'd1 < c_q) begin
              ci <= ci + 16'd1; co <= co + cstep;
            end else begin
              ci <= '0; co <= '0;
              if (ri + 16'd1 < r_q) begin
                ri <= ri + 16'd1;
              end else begin
                ri <= '0;
                if (mi + 16'd1 < m_q) mi <= mi + 16'd1;
                else                  st <= S_IDLE;
              end
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
