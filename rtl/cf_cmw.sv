// cf_cmw: coefficient memory write module (CMW), active while decoding only.
//
// A column leaving through register A carries one decoded magnitude bit per row
// (and the sign of rows that became significant). The coefficient memory holds
// the whole sign-magnitude coefficient, so CMW reads the word, sets magnitude bit
// bp and the sign, and writes it back: two port cycles per row. Only rows whose
// decoded bit is 1 are rewritten (the NBCH flag, converted by the NBC index
// converter); the memory must therefore hold zeros when decoding starts. The port
// is shared with the register data generator, which yields to CMW.
//
// Origin: the read-then-write of sign and magnitude bit in decoding follows the
// original design; rewriting only rows with a decoded 1 (hence the cleared
// memory) is this design's own.
module cf_cmw
  import cf_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              dec,
  input  logic              start,
  input  col_t              ca,
  output logic              done,
  output logic              busy_port,  // CMW drives the coefficient port this cycle
  output logic              we,
  output logic [AW-1:0]     addr,
  output logic [COEF_W-1:0] wdata,
  input  logic [COEF_W-1:0] rdata
);
  typedef enum logic [1:0] {C_IDLE, C_RUN, C_WR} st_e;

  st_e             st;
  logic [2:0]      ptr;
  logic [3:0]      flag;
  logic [3:0][1:0] idx;
  logic [2:0]      cnt;
  logic [COEF_W-1:0] word;

  always_comb begin
    for (int r = 0; r < 4; r++)
      flag[r] = dec & ca.valid & ca.rv[r] & ca.mag[r] & (3'(r) >= ptr);
  end

  cf_nbc_index u_idx (.flag(flag), .idx(idx), .count(cnt));

  always_comb begin
    word = rdata;
    word[4'(ca.bp)] = 1'b1;
    word[COEF_W-1] = ca.sgn[idx[0]];
    done      = (st == C_IDLE) || (st == C_RUN && cnt == 0);
    busy_port = (st == C_RUN && cnt != 0) || (st == C_WR);
    we        = (st == C_WR);
    addr      = {ca.stripe, idx[0], ca.col};
    wdata     = word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st  <= C_IDLE;
      ptr <= '0;
    end else if (start) begin
      st  <= C_RUN;
      ptr <= '0;
    end else if (st == C_RUN && cnt != 0) begin
      st <= C_WR;                       // read issued this cycle
    end else if (st == C_WR) begin
      st  <= C_RUN;
      ptr <= 3'(idx[0]) + 3'd1;
    end
  end
endmodule
