// cf_codec: pass-parallel, sample-skipping JPEG2000 EBCOT tier-1 context
// formation (CF) codec for one code-block of up to 32x32 samples.
//
// For every bit-plane the three coding passes run at the same time on a
// pipeline of column registers: pass 1 (significance propagation) and, while
// encoding, pass 2 (magnitude refinement) on register D; pass 3 (cleanup) and,
// while decoding, pass 2 on register B, two columns behind. Two significance
// states per sample (sigma0, sigma1) kept in the 1024x2 memory RA2SD replace the
// significance/refinement/coded states of the serial algorithm. Vertical causal
// mode is used. Within each column only the samples that belong to a pass take
// a cycle (sample skipping).
//
// Interface: pulse start with dec, band, cb_w, cb_h and num_bp stable until
// done. The coefficient memory (sign-magnitude, bit 8 = sign, bits 7..0 the
// magnitude, address row*32 + column, one-cycle read latency) is outside; while
// decoding it must start cleared and receives the decoded coefficients. Each pass
// has its own context/decision channel pN_*: pN_cx_valid with pN_cx (and the
// decision pN_d while encoding) stays up until pN_ack; while decoding pN_ack
// comes with the decoded decision on pN_d_in. Within a channel the pairs appear
// in the standard order of that pass, bit-plane by bit-plane, so the three
// streams concatenated per bit-plane (pass 1, 2, 3) equal the serial coder's
// output. Sub-modules: cf_ctrl, cf_col_regs, cf_rg, cf_smw, cf_cmw, cf_ra2sd,
// cf_p1m, cf_p2m, cf_p3m.
//
// Origin: the block structure, the pass placement and the memories follow the
// original design; the command interface, the per-pass channels, the external
// coefficient port and leaving the pass-3 run-length event (a debug output of
// cf_p3m) unconnected are this design's own.
module cf_codec
  import cf_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              dec,       // 0 = encode, 1 = decode
  input  logic [1:0]        band,      // cf_pkg::band_e
  input  logic [5:0]        cb_w,      // 1..32
  input  logic [5:0]        cb_h,      // 1..32
  input  logic [3:0]        num_bp,    // 1..8 bit-planes to code
  output logic              busy,
  output logic              done,
  // coefficient memory
  output logic [AW-1:0]     coef_addr,
  output logic              coef_we,
  output logic [COEF_W-1:0] coef_wdata,
  input  logic [COEF_W-1:0] coef_rdata,
  // pass 1 channel
  output logic              p1_cx_valid,
  output logic [4:0]        p1_cx,
  output logic              p1_d,
  input  logic              p1_ack,
  input  logic              p1_d_in,
  // pass 2 channel
  output logic              p2_cx_valid,
  output logic [4:0]        p2_cx,
  output logic              p2_d,
  input  logic              p2_ack,
  input  logic              p2_d_in,
  // pass 3 channel
  output logic              p3_cx_valid,
  output logic [4:0]        p3_cx,
  output logic              p3_d,
  input  logic              p3_ack,
  input  logic              p3_d_in
);
  band_e        band_i;
  col_t [4:0]   win;
  col_t         rg_col;
  logic [1:0]   f_count;
  logic         shift, clear, rg_push, rg_blocked, rg_finished, rg_req, rg_gnt;
  logic [11:0]  retired;
  logic [AW-1:0] rg_addr, smw_addr, cmw_addr, sig_addr;
  logic         smw_we, cmw_we, cmw_busy, sig_we;
  logic [1:0]   smw_wdata, sig_wdata, sig_rdata;
  logic [COEF_W-1:0] cmw_wdata;
  logic         p1_done, p2_done, p3_done, smw_done, cmw_done, rl_event;
  upd_t         upd_p1, upd_p2, upd_p3;
  col_t         p2_l, p2_c, p2_r;

  assign band_i = band_e'(band);

  cf_ctrl u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .clear,
    .p1_done, .p2_done, .p3_done, .smw_done, .cmw_done,
    .f_count, .rg_blocked, .rg_finished, .win, .shift, .retired,
    .smw_we, .smw_addr, .smw_wdata, .rg_req, .rg_addr, .rg_gnt,
    .sig_addr, .sig_we, .sig_wdata,
    .cmw_busy, .cmw_we, .cmw_addr, .cmw_wdata,
    .coef_addr, .coef_we, .coef_wdata
  );

  cf_ra2sd u_ra2sd (.clk, .addr(sig_addr), .we(sig_we), .wdata(sig_wdata), .rdata(sig_rdata));

  cf_rg u_rg (
    .clk, .rst_n, .start, .dec, .cb_w, .cb_h, .num_bp, .retired, .f_count,
    .gnt(rg_gnt), .rd_req(rg_req), .rd_addr(rg_addr), .sig_rdata, .coef_rdata,
    .push(rg_push), .push_col(rg_col), .blocked(rg_blocked), .finished(rg_finished)
  );

  cf_col_regs u_regs (
    .clk, .rst_n, .clear, .shift, .push(rg_push), .push_col(rg_col),
    .upd_p1, .upd_p2, .p2_on_b(dec), .upd_p3, .win, .f_count
  );

  cf_p1m u_p1m (
    .clk, .rst_n, .dec, .band(band_i), .start(shift),
    .cl(win[2]), .cc(win[3]), .cr(win[4]), .done(p1_done),
    .cx_valid(p1_cx_valid), .cx(p1_cx), .d_out(p1_d), .ack(p1_ack), .d_in(p1_d_in),
    .upd(upd_p1)
  );

  // pass 2: register D in step with pass 1 while encoding, register B while decoding
  always_comb begin
    p2_l = dec ? win[0] : win[2];
    p2_c = dec ? win[1] : win[3];
    p2_r = dec ? win[2] : win[4];
  end

  cf_p2m u_p2m (
    .clk, .rst_n, .dec, .start(shift), .cl(p2_l), .cc(p2_c), .cr(p2_r), .done(p2_done),
    .cx_valid(p2_cx_valid), .cx(p2_cx), .d_out(p2_d), .ack(p2_ack), .d_in(p2_d_in),
    .upd(upd_p2)
  );

  cf_p3m u_p3m (
    .clk, .rst_n, .dec, .band(band_i), .start(shift),
    .cl(win[0]), .cc(win[1]), .cr(win[2]), .done(p3_done),
    .cx_valid(p3_cx_valid), .cx(p3_cx), .d_out(p3_d), .ack(p3_ack), .d_in(p3_d_in),
    .upd(upd_p3), .rl_event
  );

  cf_smw u_smw (
    .clk, .rst_n, .start(shift), .ca(win[0]), .done(smw_done),
    .we(smw_we), .addr(smw_addr), .wdata(smw_wdata)
  );

  cf_cmw u_cmw (
    .clk, .rst_n, .dec, .start(shift), .ca(win[0]), .done(cmw_done),
    .busy_port(cmw_busy), .we(cmw_we), .addr(cmw_addr), .wdata(cmw_wdata), .rdata(coef_rdata)
  );
endmodule
