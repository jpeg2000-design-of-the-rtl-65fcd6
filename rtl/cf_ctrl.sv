// cf_ctrl: controller of the pass-parallel CF codec.
//
// Pipeline: the column registers shift (one step of the pipeline) in the cycle
// in which every module working on them reports done - pass 1, pass 2, pass 3,
// SMW and CMW - and either a new column waits in F, or the register data
// generator is blocked on its ordering rule, or the generator has finished and
// real columns are still in the pipeline. In the two latter cases an empty
// column is shifted in. The shift edge is also the start of every module on its
// new column. Each counted slot leaving register A increments "retired", which
// paces the generator. busy rises with start and falls, with a one-cycle done
// pulse, once the generator has finished and the pipeline is empty.
//
// Memory ports: the significance memory is shared by SMW (writes, priority)
// and RG (reads); the external coefficient memory by CMW (read-modify-write,
// priority) and RG. RG is granted only cycles in which neither writer uses
// either memory, so its two reads always happen together.
//
// Origin: the shift-when-all-done rule and the controller's role follow the
// original design; empty-column shifting while the generator waits, the retired
// counter and the port priorities are this design's own.
module cf_ctrl
  import cf_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              clear,
  // pipeline
  input  logic              p1_done, p2_done, p3_done, smw_done, cmw_done,
  input  logic [1:0]        f_count,
  input  logic              rg_blocked,
  input  logic              rg_finished,
  input  col_t [4:0]        win,
  output logic              shift,
  output logic [11:0]       retired,
  // significance memory port
  input  logic              smw_we,
  input  logic [AW-1:0]     smw_addr,
  input  logic [1:0]        smw_wdata,
  input  logic              rg_req,
  input  logic [AW-1:0]     rg_addr,
  output logic              rg_gnt,
  output logic [AW-1:0]     sig_addr,
  output logic              sig_we,
  output logic [1:0]        sig_wdata,
  // coefficient memory port
  input  logic              cmw_busy,
  input  logic              cmw_we,
  input  logic [AW-1:0]     cmw_addr,
  input  logic [COEF_W-1:0] cmw_wdata,
  output logic [AW-1:0]     coef_addr,
  output logic              coef_we,
  output logic [COEF_W-1:0] coef_wdata
);
  logic all_done, pipe_busy, fin;

  always_comb begin
    pipe_busy = 1'b0;
    for (int i = 0; i < 5; i++) pipe_busy |= win[i].valid | win[i].rg;
    all_done = p1_done & p2_done & p3_done & smw_done & cmw_done;
    shift    = busy & all_done & ((f_count != 0) | rg_blocked | (rg_finished & pipe_busy));
    fin      = busy & rg_finished & !pipe_busy & (f_count == 0);
    clear    = start;

    rg_gnt     = rg_req & !smw_we & !cmw_busy;
    sig_addr   = smw_we ? smw_addr : rg_addr;
    sig_we     = smw_we;
    sig_wdata  = smw_wdata;
    coef_addr  = cmw_busy ? cmw_addr : rg_addr;
    coef_we    = cmw_we;
    coef_wdata = cmw_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      retired <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy    <= 1'b1;
        retired <= '0;
      end else begin
        if (shift && win[0].rg) retired <= retired + 12'd1;
        if (fin) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
