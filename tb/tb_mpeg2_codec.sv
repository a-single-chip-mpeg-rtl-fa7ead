// tb_mpeg2_codec: end-to-end test of the codec top level at its default
// parameters, with a behavioural SDRAM on the shared memory port and the
// processor cores of the six media modules played by concurrent test processes.
//   ME MM (3): the core writes a four-descriptor DMA chain into its data RAM; one
//     start loads a target macroblock and a reference window into buffer bank 0,
//     the block matcher searches them while a second chain fills bank 1 with a
//     brighter copy of another target, which is then searched with dc
//     compensation. The motion vectors and SADs must be the planted ones.
//   Video MM (2): random codes go through the VLC packer into the VLC RAM, a DMA
//     writes them to SDRAM, a second DMA brings them into the VLD RAM and the VLD
//     reads them back with GET instructions. The SDRAM region is guarded by a
//     hardware semaphore that the general-control MM (5) tries to take meanwhile.
//     The DCT, IQ, PMV, MC, fine ME, core option, SIMD and audio coprocessor
//     units each get one known computation.
//   Stream MM (0): bytes in, words out, including the input-level interrupt.
//   Audio MM (1): I2S output port 0 looped to the input; samples must return.
//   Video I/O MM (4): BT.656 output looped to the input; lines must return.
//   MMs 0, 1, 4 and 5 also make random SDRAM reads and writes through their bridges.
// Every mechanism is counted (bus contention, semaphore refusal, descriptor
// chain, DMA both ways, double-buffer overlap, VLD refills, interrupts per MM,
// I/O traffic); one that never occurs is a failure.
module tb_mpeg2_codec;
  import codec_pkg::*;
  localparam int DD = 4096, N_SEM = 16;
  localparam int TGT0 = 32'h1_0000, TGT1 = 32'h1_1000, REFP = 32'h2_0000, VLCB = 32'h3_0000;
  logic clk = 0, rst_n = 0;
  bus_req_t mem_req; bus_rsp_t mem_rsp;
  logic [N_SEM-1:0] sem_locked;
  logic core_dr_en [NUM_MM], core_dr_we [NUM_MM];
  logic [11:0] core_dr_addr [NUM_MM];
  logic [31:0] core_dr_wdata [NUM_MM], core_dr_rdata [NUM_MM];
  bus_req_t core_req [NUM_MM]; bus_rsp_t core_rsp [NUM_MM];
  logic cb_we [NUM_MM]; logic [7:0] cb_addr [NUM_MM]; logic [31:0] cb_wdata [NUM_MM], cb_rdata [NUM_MM];
  logic [7:0] irq_enable [NUM_MM]; logic [1:0] irq_level [NUM_MM][8];
  logic irq_ack [NUM_MM]; logic [2:0] irq_ack_id [NUM_MM]; logic irq [NUM_MM]; logic [2:0] irq_id [NUM_MM];
  logic [NUM_MM-1:0] bus_grant_seen;
  logic si_valid, si_sync, bs_in_pop, bs_in_empty, bs_out_push, so_valid, so_ready;
  logic [7:0] si_data, so_data; logic [31:0] bs_in_data, bs_out_data;
  logic cop_valid; logic [4:0] cop_op; logic [2:0] cop_rd, cop_rs, cop_rt; logic cop_acc; logic [5:0] cop_sa;
  logic cop_use_core; logic [31:0] cop_gpr_in, cop_ld_data, cop_gpr_out; logic [63:0] cop_acc_out [2];
  logic [2:0] opt_op; logic [31:0] opt_rs, opt_rt, opt_rd; logic [4:0] opt_imm;
  logic i2s_rx_sck, i2s_rx_ws, i2s_rx_sd, i2s_tx_wr, i2s_tx_sck, i2s_tx_ws;
  logic [1:0] i2s_tx_port; logic [15:0] i2s_tx_left, i2s_tx_right, i2s_rx_left, i2s_rx_right; logic [2:0] i2s_tx_sd;
  logic vld_start, vld_cmd_valid, vld_cmd_ready, vld_res_valid; logic [15:0] vld_start_addr;
  logic [1:0] vld_cmd_op; logic [5:0] vld_cmd_n; logic [31:0] vld_res_data;
  logic vlc_start, vlc_put, vlc_flush; logic [15:0] vlc_start_addr; logic [5:0] vlc_n; logic [31:0] vlc_code, vlc_bit_count;
  logic pmv_reset, pmv_req, pmv_r, pmv_s, pmv_t, pmv_fld, pmv_valid; logic [3:0] pmv_f_code;
  logic signed [5:0] pmv_motion_code; logic [7:0] pmv_motion_residual; logic signed [15:0] pmv_vector;
  logic dct_in_we, dct_start, dct_busy, dct_done; logic [5:0] dct_in_addr, dct_rd_addr; logic [1:0] dct_mode;
  logic signed [15:0] dct_in_data, dct_rd_data;
  logic q_w_we, q_w_sel, q_inv, q_intra, q_in_valid, q_in_first, q_out_valid; logic [5:0] q_w_addr; logic [7:0] q_w_data;
  logic [6:0] q_qscale; logic [1:0] q_dc_prec; logic signed [15:0] q_in_data, q_out_data;
  logic mc_in_valid, mc_hx_f, mc_hy_f, mc_hx_b, mc_hy_b, mc_out_valid; logic [1:0] mc_mode;
  logic [7:0] mc_fwd [8][4], mc_bwd [8][4], mc_pred [8], mc_recon [8]; logic signed [15:0] mc_resid [8];
  logic mef_tgt_we, mef_ref_we, mef_ref_dir, mef_start, mef_busy, mef_done; logic [7:0] mef_tgt_addr, mef_tgt_data, mef_ref_data;
  logic [8:0] mef_ref_addr; logic [3:0] mef_enable; logic [1:0] mef_mode; logic [15:0] mef_activity;
  logic [7:0] mef_pred_addr, mef_pred_data;
  logic [3:0] uci_op; logic [31:0] uci_rs, uci_rt, uci_rd; logic [15:0] uci_imm;
  logic vid_en, vid_in_word_valid, vid_out_px_req; logic [7:0] vid_in, vid_out, vid_out_px_data;
  logic [31:0] vid_in_word; logic [8:0] vid_in_word_idx;

  mpeg2_codec dut (.*);
  sdram_model #(.LAT(3)) sdram (.clk, .req(mem_req), .rsp(mem_rsp));
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_contention = 0, n_sem_refused = 0, n_sem_taken = 0, n_vld_refill = 0, n_dbuf_overlap = 0;
  int n_core_bus = 0, n_stream_words = 0, n_audio_pairs = 0, n_video_words = 0, n_vlc_codes = 0;
  int icnt [NUM_MM][8];
  int n_grant [NUM_MM];
  bit done_main = 0;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; if (failures < 12) $display("%s: got %h exp %h", what, got, exp); end
  endtask

  // ---------------- core-side helpers (one process per MM uses its own index)
  task automatic dr_wr(input int m, input int a, input logic [31:0] d);
    @(negedge clk); core_dr_en[m] = 1; core_dr_we[m] = 1; core_dr_addr[m] = 12'(a); core_dr_wdata[m] = d;
    @(negedge clk); core_dr_en[m] = 0; core_dr_we[m] = 0;
  endtask
  task automatic cb_wr(input int m, input int a, input logic [31:0] d);
    @(negedge clk); cb_we[m] = 1; cb_addr[m] = 8'(a); cb_wdata[m] = d;
    @(negedge clk); cb_we[m] = 0;
  endtask
  task automatic cb_rd(input int m, input int a, output logic [31:0] d);
    @(negedge clk); cb_addr[m] = 8'(a); #1 d = cb_rdata[m];
  endtask
  task automatic bus(input int m, input bit we, input logic [31:0] a, input logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk); core_req[m] = '{1'b1, we, a, wd};
    do @(posedge clk); while (!core_rsp[m].ack);
    rd = core_rsp[m].rdata; n_core_bus++;
    @(negedge clk); core_req[m] = '0;
  endtask
  task automatic wait_irq(input int m, input int id, input int prev);
    while (icnt[m][id] <= prev) @(posedge clk);
  endtask
  task automatic desc(input int m, input int at, input logic [31:0] src, input logic [31:0] dst,
                      input int h, input int w, input int ss, input int ds, input bit dir, input int nxt);
    dr_wr(m, at, src); dr_wr(m, at + 1, dst); dr_wr(m, at + 2, {16'(h), 16'(w)});
    dr_wr(m, at + 3, {16'(ds), 16'(ss)}); dr_wr(m, at + 4, {31'd0, dir}); dr_wr(m, at + 5, 32'(nxt));
  endtask
  task automatic dma_wait(input int m);
    logic [31:0] d;
    do cb_rd(m, 0, d); while (d[31]);
  endtask

  // interrupt service: acknowledge and count whatever the controller shows
  for (genvar m = 0; m < NUM_MM; m++) begin : g_isr
    initial begin
      irq_ack[m] = 0; irq_ack_id[m] = 0;
      forever begin
        @(negedge clk);
        if (rst_n && irq[m]) begin irq_ack[m] = 1; irq_ack_id[m] = irq_id[m]; icnt[m][irq_id[m]]++; end
        else irq_ack[m] = 0;
      end
    end
  end

  // mechanism monitors
  always @(posedge clk) if (rst_n) begin
    int nreq; nreq = 0;
    for (int m = 0; m < NUM_MM; m++) nreq += int'(dut.mb_req[m].req);
    if (nreq >= 2) n_contention++;
    if (dut.vld_mem_en) n_vld_refill++;
    for (int m = 0; m < NUM_MM; m++) if (bus_grant_seen[m]) n_grant[m]++;
    if (dut.lb_en[3] && dut.lb_we[3] && dut.u_me.busy) n_dbuf_overlap++;
  end

  // ---------------- ME MM: chained DMA into the block matcher, double buffered
  logic [7:0] refpx [64][64];
  function automatic logic [31:0] pack4(input logic [7:0] p0, input logic [7:0] p1, input logic [7:0] p2, input logic [7:0] p3);
    return {p3, p2, p1, p0};
  endfunction

  task automatic me_test();
    logic [31:0] d;
    int c0;
    // reference picture 64x64 (16 words per row), values 0..200
    for (int y = 0; y < 64; y++) for (int x = 0; x < 64; x++) refpx[y][x] = 8'($urandom % 201);
    for (int y = 0; y < 64; y++) for (int w = 0; w < 16; w++)
      sdram.poke(REFP + y*16 + w, pack4(refpx[y][4*w], refpx[y][4*w+1], refpx[y][4*w+2], refpx[y][4*w+3]));
    // window origin (16, 8); target 0 at displacement (+3, -5), target 1 at (-6, +2) and +10 brighter
    for (int r = 0; r < 16; r++) for (int w = 0; w < 4; w++) begin
      int bx0, by0, bx1, by1;
      bx0 = 16 + 8 + 3; by0 = 8 + 8 - 5; bx1 = 16 + 8 - 6; by1 = 8 + 8 + 2;
      sdram.poke(TGT0 + r*4 + w, pack4(refpx[by0+r][bx0+4*w], refpx[by0+r][bx0+4*w+1], refpx[by0+r][bx0+4*w+2], refpx[by0+r][bx0+4*w+3]));
      sdram.poke(TGT1 + r*4 + w, pack4(refpx[by1+r][bx1+4*w] + 8'd10, refpx[by1+r][bx1+4*w+1] + 8'd10,
                                       refpx[by1+r][bx1+4*w+2] + 8'd10, refpx[by1+r][bx1+4*w+3] + 8'd10));
    end
    // chain A (bank 0): target 16x4 words, reference window 32 rows x 8 words
    desc(3, 64, TGT0, DD + 16'h0000, 16, 4, 4, 4, 0, 70);
    desc(3, 70, REFP + 8*16 + 4, DD + 16'h1000, 32, 8, 16, 8, 0, 0);
    // chain B (bank 1)
    desc(3, 80, TGT1, DD + 16'h0800, 16, 4, 4, 4, 0, 86);
    desc(3, 86, REFP + 8*16 + 4, DD + 16'h1800, 32, 8, 16, 8, 0, 0);
    c0 = icnt[3][0];
    cb_wr(3, 7, 64);
    wait_irq(3, 0, c0);
    cb_wr(3, 8 + 1, {8'sd8, -8'sd8, 8'sd8, -8'sd8});
    cb_wr(3, 8 + 2, 0);
    c0 = icnt[3][1];
    cb_wr(3, 8 + 0, 32'b000);             // search banks 0/0 ...
    cb_wr(3, 7, 80);                      // ... while chain B fills banks 1/1
    wait_irq(3, 1, c0);
    cb_rd(3, 8 + 1, d); chk(d, {16'd0, 8'(-5), 8'(3)}, "ME bank 0 motion vector");
    cb_rd(3, 8 + 2, d); chk(d, 0, "ME bank 0 SAD");
    cb_rd(3, 8 + 3, d); chk(d, 2 * 17 * 17 + 3, "ME search cycles");
    dma_wait(3);
    cb_wr(3, 8 + 2, 10);
    c0 = icnt[3][1];
    cb_wr(3, 8 + 0, 32'b110);
    wait_irq(3, 1, c0);
    cb_rd(3, 8 + 1, d); chk(d, {16'd0, 8'(2), 8'(-6)}, "ME bank 1 motion vector");
    cb_rd(3, 8 + 2, d); chk(d, 0, "ME bank 1 SAD (dc compensated)");
    chk(32'(icnt[3][0]), 2, "ME MM DMA interrupts");
  endtask

  // ---------------- video MM: VLC -> SDRAM -> VLD, guarded by semaphore 3
  logic [31:0] codes [200]; int lens [200];
  int vlc_words;
  task automatic video_test();
    logic [31:0] d;
    int bits, c0;
    do bus(2, 0, 32'h8000_0003, 0, d); while (d != 1);
    n_sem_taken++;
    @(negedge clk); vlc_start = 1; vlc_start_addr = 0;
    @(negedge clk); vlc_start = 0;
    bits = 0;
    for (int i = 0; i < 200; i++) begin
      lens[i] = 1 + $urandom % 32;
      codes[i] = $urandom & ((lens[i] == 32) ? 32'hFFFF_FFFF : ((32'd1 << lens[i]) - 1));
      bits += lens[i];
      @(negedge clk); vlc_put = 1; vlc_n = 6'(lens[i]); vlc_code = codes[i]; n_vlc_codes++;
    end
    @(negedge clk); vlc_put = 0; vlc_flush = 1;
    @(negedge clk); vlc_flush = 0;
    repeat (3) @(negedge clk);
    chk(vlc_bit_count, 32'(bits), "VLC bit count");
    vlc_words = (bits + 31) / 32;
    // local (VLC RAM) -> SDRAM, then SDRAM -> local (VLD RAM)
    c0 = icnt[2][0];
    cb_wr(2, 0, DD + 16'h1000); cb_wr(2, 1, VLCB); cb_wr(2, 2, {16'd1, 16'(vlc_words)});
    cb_wr(2, 3, 0); cb_wr(2, 4, 1); cb_wr(2, 6, 0);
    wait_irq(2, 0, c0);
    c0 = icnt[2][0];
    cb_wr(2, 0, VLCB); cb_wr(2, 1, DD + 0); cb_wr(2, 4, 0); cb_wr(2, 6, 0);
    wait_irq(2, 0, c0);
    bus(2, 1, 32'h8000_0003, 0, d);        // release
    @(negedge clk); vld_start = 1; vld_start_addr = 0;
    @(negedge clk); vld_start = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk); vld_cmd_valid = 1; vld_cmd_op = 2'd1; vld_cmd_n = 6'(lens[i]);
      do @(posedge clk); while (!vld_cmd_ready);
      @(negedge clk); vld_cmd_valid = 0;
      #1 chk(vld_res_data, codes[i], "VLD decode of VLC stream");
    end
    chk(32'(icnt[2][0]), 2, "video MM DMA interrupts");
  endtask

  task automatic engines_test();
    logic [31:0] d;
    // DCT: IDCT of a DC-only block gives a flat block (64 / 8 = 8)
    for (int i = 0; i < 64; i++) begin @(negedge clk); dct_in_we = 1; dct_in_addr = 6'(i); dct_in_data = (i == 0) ? 16'sd64 : 16'sd0; end
    @(negedge clk); dct_in_we = 0; dct_start = 1; dct_mode = 2'd1;
    @(negedge clk); dct_start = 0;
    while (!dct_done) @(negedge clk);
    for (int i = 0; i < 64; i += 9) begin dct_rd_addr = 6'(i); #1 chk(32'(dct_rd_data), 8, "IDCT of DC block"); end
    // MC: bidirectional half-pel average plus residual
    for (int l = 0; l < 8; l++) begin
      for (int k = 0; k < 4; k++) begin mc_fwd[l][k] = 8'(10 * l + k); mc_bwd[l][k] = 8'(100 + l); end
      mc_resid[l] = 16'sd5;
    end
    @(negedge clk); mc_in_valid = 1; mc_mode = 2'd2; mc_hx_f = 1; mc_hy_f = 1; mc_hx_b = 0; mc_hy_b = 0;
    @(negedge clk); mc_in_valid = 0;
    @(negedge clk);
    for (int l = 0; l < 8; l++) begin
      int pf; pf = (40 * l + 6 + 2) / 4;
      chk(32'(mc_recon[l]), 32'((pf + 100 + l + 1) / 2 + 5), "MC bidirectional reconstruction");
    end
    // core option unit (absolute difference) and SIMD custom instruction (XOR)
    opt_op = 3'd1; opt_rs = 32'd7; opt_rt = 32'd19; uci_op = 4'd11; uci_rs = 32'hF0F0_1234; uci_rt = 32'h0FF0_FFFF;
    #1 chk(opt_rd, 12, "core option ABSD"); chk(uci_rd, 32'hFF00_EDCB, "SIMD XOR");
    // inverse quantiser, non-intra: (2*3 + 1) * 16 * 2 / 32 = 7
    @(negedge clk); q_w_we = 1; q_w_sel = 1; q_w_addr = 0; q_w_data = 8'd16;
    @(negedge clk); q_w_we = 0; q_inv = 1; q_intra = 0; q_qscale = 7'd2; q_in_valid = 1; q_in_first = 1; q_in_data = 16'sd3;
    @(negedge clk); q_in_valid = 0; q_in_first = 0;
    chk(32'(q_out_valid), 1, "IQ valid"); chk(32'(q_out_data), 7, "IQ non-intra value");
    // motion vector reconstruction: f_code 2 (f = 2), motion_code -2, residual 1: delta = -((2-1)*2 + 1 + 1) = -4
    @(negedge clk); pmv_reset = 1;
    @(negedge clk); pmv_reset = 0; pmv_req = 1; pmv_f_code = 4'd2; pmv_motion_code = -6'sd2; pmv_motion_residual = 8'd1;
    @(negedge clk); pmv_req = 0;
    chk(32'(pmv_valid), 1, "PMV valid"); chk(32'(pmv_vector), 32'(-4), "PMV vector");
    // audio coprocessor: r1 = 1000, r2 = -3, acc0 = 2 * (r1 * r2), r3 = acc0
    @(negedge clk); cop_valid = 1; cop_op = 5'd21; cop_rd = 1; cop_ld_data = 32'd1000;
    @(negedge clk); cop_rd = 2; cop_ld_data = 32'(-3);
    @(negedge clk); cop_op = 5'd14; cop_acc = 0;
    @(negedge clk); cop_op = 5'd11; cop_rs = 1; cop_rt = 2;
    @(negedge clk); cop_op = 5'd11;
    @(negedge clk); cop_op = 5'd13; cop_rd = 3; cop_sa = 0;
    @(negedge clk); cop_valid = 0; cop_rs = 3;
    #1 chk(cop_gpr_out, 32'(-6000), "coprocessor multiply-add");
    // fine ME: flat target and references; forward and intra enabled, SAD 0 keeps forward
    begin
      int c0; c0 = icnt[2][3];
      for (int i = 0; i < 256; i++) begin @(negedge clk); mef_tgt_we = 1; mef_tgt_addr = 8'(i); mef_tgt_data = 8'd90; end
      @(negedge clk); mef_tgt_we = 0;
      for (int i = 0; i < 324; i++) begin @(negedge clk); mef_ref_we = 1; mef_ref_dir = 0; mef_ref_addr = 9'(i); mef_ref_data = 8'd90; end
      @(negedge clk); mef_ref_we = 0; mef_start = 1; mef_enable = 4'b1001;
      @(negedge clk); mef_start = 0;
      wait_irq(2, 3, c0);
      chk(32'(mef_mode), 0, "fine ME mode"); chk(32'(mef_activity), 0, "fine ME activity");
      mef_pred_addr = 8'd77; #1 chk(32'(mef_pred_data), 90, "fine ME prediction RAM");
    end
  endtask

  // ---------------- stream MM: bytes to words, level interrupt
  task automatic stream_test();
    logic [7:0] b [$];
    int c0;
    c0 = icnt[0][1];
    for (int i = 0; i < 4 * 48; i++) begin
      @(negedge clk); si_valid = 1; si_sync = (i % 188) == 0; si_data = 8'($urandom); b.push_back(si_data);
    end
    @(negedge clk); si_valid = 0;
    wait_irq(0, 1, c0);
    while (!bs_in_empty) begin
      logic [31:0] e;
      e = {b.pop_front(), b.pop_front(), b.pop_front(), b.pop_front()};
      chk(bs_in_data, e, "stream word"); n_stream_words++;
      @(negedge clk); bs_in_pop = 1;
      @(negedge clk); bs_in_pop = 0;
    end
  endtask

  // ---------------- background traffic and semaphore contention
  task automatic traffic(input int m, input int n);
    logic [31:0] d, a, w;
    for (int i = 0; i < n; i++) begin
      a = 32'h5_0000 + 32'(m) * 32'h100 + 32'($urandom % 64);
      w = $urandom;
      bus(m, 1, a, w, d);
      bus(m, 0, a, 0, d); chk(d, w, "core write/read back");
    end
  endtask

  // audio loopback: port 0 of the output to the input
  assign i2s_rx_sck = i2s_tx_sck;
  assign i2s_rx_ws  = i2s_tx_ws;
  assign i2s_rx_sd  = i2s_tx_sd[0];
  logic [31:0] aq [$];
  bit a_sync = 0;
  always @(posedge clk) if (rst_n && !done_main) begin
    if (dut.aud_tx_irq) begin
      logic [15:0] l, r; l = 16'($urandom); r = 16'($urandom);
      i2s_tx_wr <= 1; i2s_tx_port <= 0; i2s_tx_left <= l; i2s_tx_right <= r; aq.push_back({l, r});
    end else i2s_tx_wr <= 0;
    if (dut.aud_rx_irq && aq.size() != 0 && (a_sync || {i2s_rx_left, i2s_rx_right} != 0)) begin
      a_sync = 1; chk({i2s_rx_left, i2s_rx_right}, aq.pop_front(), "I2S loopback"); n_audio_pairs++;
    end
  end

  // video loopback, 27 MHz byte strobe as every other cycle
  assign vid_in = vid_out;
  logic [7:0] vq [$];
  always @(posedge clk) if (rst_n) begin
    vid_en <= !vid_en;
    if (vid_out_px_req) begin vq.push_back(vid_out_px_data); vid_out_px_data <= (vid_out_px_data == 8'd254) ? 8'd1 : vid_out_px_data + 8'd1; end
    if (vid_in_word_valid) begin
      logic [31:0] e;
      for (int k = 0; k < 4; k++) e[8*k +: 8] = vq.pop_front();
      chk(vid_in_word, e, "BT.656 loopback"); n_video_words++;
    end
  end

  initial begin
    for (int m = 0; m < NUM_MM; m++) begin
      core_dr_en[m] = 0; core_dr_we[m] = 0; core_dr_addr[m] = 0; core_dr_wdata[m] = 0; core_req[m] = '0;
      cb_we[m] = 0; cb_addr[m] = 0; cb_wdata[m] = 0; irq_enable[m] = 8'hFF;
      for (int i = 0; i < 8; i++) begin irq_level[m][i] = 2'(i); icnt[m][i] = 0; end
      n_grant[m] = 0;
    end
    si_valid = 0; si_sync = 0; si_data = 0; bs_in_pop = 0; bs_out_push = 0; bs_out_data = 0; so_ready = 1;
    cop_valid = 0; cop_op = 0; cop_rd = 0; cop_rs = 0; cop_rt = 0; cop_acc = 0; cop_sa = 0; cop_use_core = 0;
    cop_gpr_in = 0; cop_ld_data = 0; opt_op = 0; opt_rs = 0; opt_rt = 0; opt_imm = 0;
    i2s_tx_wr = 0; i2s_tx_port = 0; i2s_tx_left = 0; i2s_tx_right = 0;
    vld_start = 0; vld_start_addr = 0; vld_cmd_valid = 0; vld_cmd_op = 0; vld_cmd_n = 0;
    vlc_start = 0; vlc_start_addr = 0; vlc_put = 0; vlc_n = 0; vlc_code = 0; vlc_flush = 0;
    pmv_reset = 0; pmv_req = 0; pmv_r = 0; pmv_s = 0; pmv_t = 0; pmv_fld = 0; pmv_f_code = 0;
    pmv_motion_code = 0; pmv_motion_residual = 0;
    dct_in_we = 0; dct_in_addr = 0; dct_in_data = 0; dct_start = 0; dct_mode = 0; dct_rd_addr = 0;
    q_w_we = 0; q_w_sel = 0; q_w_addr = 0; q_w_data = 0; q_inv = 0; q_intra = 0; q_qscale = 1; q_dc_prec = 0;
    q_in_valid = 0; q_in_first = 0; q_in_data = 0;
    mc_in_valid = 0; mc_mode = 0; mc_hx_f = 0; mc_hy_f = 0; mc_hx_b = 0; mc_hy_b = 0;
    for (int l = 0; l < 8; l++) begin mc_resid[l] = 0; for (int k = 0; k < 4; k++) begin mc_fwd[l][k] = 0; mc_bwd[l][k] = 0; end end
    mef_tgt_we = 0; mef_tgt_addr = 0; mef_tgt_data = 0; mef_ref_we = 0; mef_ref_dir = 0; mef_ref_addr = 0;
    mef_ref_data = 0; mef_start = 0; mef_enable = 0; mef_pred_addr = 0;
    uci_op = 0; uci_rs = 0; uci_rt = 0; uci_imm = 0;
    vid_en = 0; vid_out_px_data = 1;
    repeat (4) @(negedge clk); rst_n = 1;
    fork
      me_test();
      video_test();
      engines_test();
      stream_test();
      traffic(0, 60);
      traffic(1, 60);
      traffic(4, 10);
      begin : sem_contender                    // MM 5 waits for the VLC/VLD region
        logic [31:0] d;
        repeat (50) @(negedge clk);
        do begin bus(5, 0, 32'h8000_0003, 0, d); if (d != 1) n_sem_refused++; end while (d != 1);
        n_sem_taken++;
        chk(32'(sem_locked[3]), 1, "semaphore held by MM 5");
        bus(5, 1, 32'h8000_0003, 0, d);
        traffic(5, 30);
      end
    join
    // let the video path deliver active lines (first active line is line 20)
    while (n_video_words < 3 * 360) @(posedge clk);
    while (n_audio_pairs < 8) @(posedge clk);
    done_main = 1;
    checks++; if (n_contention == 0) begin failures++; $display("no bus contention"); end
    checks++; if (n_sem_refused == 0 || n_sem_taken != 2) begin failures++; $display("semaphore: refused %0d taken %0d", n_sem_refused, n_sem_taken); end
    checks++; if (n_vld_refill < vlc_words) begin failures++; $display("VLD refills %0d", n_vld_refill); end
    checks++; if (n_dbuf_overlap == 0) begin failures++; $display("no double-buffer overlap"); end
    checks++; if (n_stream_words != 48) begin failures++; $display("stream words %0d", n_stream_words); end
    checks++; if (icnt[0][1] == 0 || icnt[4][1] == 0 || icnt[1][1] == 0 || icnt[1][2] == 0 || icnt[2][2] == 0 || icnt[2][3] == 0) begin
      failures++; $display("missing engine interrupts"); end
    for (int m = 0; m < NUM_MM; m++) begin checks++; if (n_grant[m] == 0) begin failures++; $display("MM %0d never granted", m); end end
    $display("contention %0d sem refused %0d vld refills %0d dbuf overlap %0d core bus %0d stream %0d audio %0d video words %0d vlc codes %0d sdram rd %0d wr %0d",
             n_contention, n_sem_refused, n_vld_refill, n_dbuf_overlap, n_core_bus, n_stream_words, n_audio_pairs,
             n_video_words, n_vlc_codes, sdram.n_rd, sdram.n_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
