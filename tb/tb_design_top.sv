// tb_design_top: full-size end-to-end test of design_top, the two designs
// side by side with no parameter changed: the ToR switch upstream path
// (2048-entry MAC table, K = 4 active destination queues, 64 pages of 256
// 512-bit words, 64-cycle lock windows, 2048-cycle slots) and the
// ship-detection CNN (80x80x3 image).
//
// ToR part: as in the switch's own testbench, frames to seven destinations
// (one only reachable through a table miss) are pushed while the schedule is
// held back long enough for the pages to run out; the page stream is then
// checked beat by beat per destination, with page useful sizes, slot VLAN and
// wavelength, total volume and the return of all pages.
// CNN part: the same image is classified twice while the switch runs; the
// number of values leaving each layer must match the network shape, both
// runs must give the same scores in the same number of cycles, and that count
// must lie near the 0.687 ms at 270 MHz (about 185,500 cycles) of the
// reference design, bounded below by the first layer's 32*76*76 cycles.
// Each mechanism of both designs is counted and must occur at least once.
module tb_design_top;
  localparam int ND = 7, PW = 256, SC = 2048, NPG = 64, TL = 64, BW = 64, IMG = 80;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic cfg_we = 0, cfg_valid = 0;
  logic [10:0] cfg_idx = 0;
  logic [47:0] cfg_mac = 0;
  logic s_valid = 0, s_ready, s_last = 0;
  logic [63:0] s_data = 0;
  logic [3:0] s_bytes = 0;
  logic rx_valid = 0, rx_last = 0;
  logic [31:0] rx_data = 0;
  logic m_valid, m_last, slot_start, slot_empty, lut_miss;
  logic [511:0] m_data;
  logic [11:0] m_useful;
  logic [6:0] slot;
  logic [5:0] vlan;
  logic [7:0] wavelength;
  logic [6:0] free_pages;
  logic cnn_img_we = 0, cnn_start = 0, cnn_busy, cnn_done, cnn_is_ship;
  logic [1:0] cnn_img_ch = 0;
  logic [6:0] cnn_img_row = 0;
  logic [IMG*8-1:0] cnn_img_data = '0;
  cnn_pkg::act_t cnn_score [2];

  design_top dut (.*);

  int checks = 0, failures = 0;
  int ids [ND] = '{0, 3, 17, 100, 500, 1023, 2000};
  logic [47:0] macs [ND];
  logic [63:0] expq [ND][$];
  int sent_beats [ND], got_beats [ND];
  int tbl_dest [14], tbl_vlan [14], tbl_wl [14];

  int n_assign = 0, n_release = 0, n_stall = 0, n_flush = 0, n_full = 0, n_alloc = 0, n_nopage = 0,
      n_lock = 0, n_empty = 0, n_miss = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_tor.u_voq.ev_assign) n_assign++;
    if (dut.u_tor.u_voq.ev_release) n_release++;
    if (dut.u_tor.u_voq.stall && !dut.u_tor.u_voq.bram_q[2]) n_stall++;
    if (dut.u_tor.u_voq.ev_flush) n_flush++;
    if (dut.u_tor.u_voq.burst_valid && dut.u_tor.u_voq.burst_ready && dut.u_tor.u_voq.burst_words >= BW) n_full++;
    if (dut.u_tor.u_buf.w_go && dut.u_tor.u_buf.w_need) n_alloc++;
    if (dut.u_tor.u_buf.no_page) n_nopage++;
    if (dut.u_tor.u_buf.lock_switch) n_lock++;
    if (slot_empty && rst_n) n_empty++;
    if (lut_miss) n_miss++;
  end

  // Lock windows: once the other side asks, the owner keeps the memory port
  // for at most T_L (64) cycles.
  int win_len = 0, max_win = 0;
  logic last_grant = 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_tor.u_buf.grant_wr != last_grant) win_len = 0;
    else if (dut.u_tor.u_buf.grant_wr ? dut.u_tor.u_buf.rs_run : dut.u_tor.u_buf.ws_run) win_len++;
    if (win_len > max_win) max_win = win_len;
    last_grant = dut.u_tor.u_buf.grant_wr;
  end

  // CNN stage monitors.
  int n_c1 = 0, n_p1 = 0, n_c2 = 0, n_p2 = 0, n_fc = 0, n_done = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_cnn.c1_v) n_c1++;
    if (dut.u_cnn.p1_v) n_p1++;
    if (dut.u_cnn.c2_v) n_c2++;
    if (dut.u_cnn.p2_v) n_p2++;
    if (dut.u_cnn.fc_done) n_fc++;
    if (cnn_done) n_done++;
  end

  // CNN driver: loads one image and classifies it twice.
  int cnn_cyc [2];
  cnn_pkg::act_t cnn_res [2][2];
  logic cnn_finished = 0;
  initial begin
    @(posedge rst_n);
    for (int c = 0; c < 3; c++)
      for (int y = 0; y < IMG; y++) begin
        @(negedge clk);
        cnn_img_we = 1; cnn_img_ch = 2'(c); cnn_img_row = 7'(y);
        for (int x = 0; x < IMG; x++) cnn_img_data[x*8 +: 8] = 8'((c * 97 + y * 13 + x * 7 + (x * y) % 31) % 256);
      end
    @(negedge clk); cnn_img_we = 0;
    for (int r = 0; r < 2; r++) begin
      cnn_start = 1; @(negedge clk); cnn_start = 0;
      cnn_cyc[r] = 1;
      while (!cnn_done) begin @(negedge clk); cnn_cyc[r]++; end
      @(negedge clk);
      cnn_res[r][0] = cnn_score[0]; cnn_res[r][1] = cnn_score[1];
      $display("CNN run %0d: %0d cycles, scores %0d %0d, ship %0d", r, cnn_cyc[r], cnn_score[0], cnn_score[1], cnn_is_ship);
    end
    cnn_finished = 1;
  end

  // Page monitor.
  int cur_d = 0, pg_nonff = 0;
  always @(posedge clk) begin
    if (slot_start && rst_n) begin
      checks++;
      if (int'(vlan) != tbl_vlan[slot] || int'(wavelength) != tbl_wl[slot]) begin
        failures++; $display("slot %0d: vlan %0d wl %0d", slot, vlan, wavelength);
      end
      cur_d = tbl_dest[slot];
    end
    if (m_valid && rst_n) begin
      for (int b = 0; b < 8; b++) begin
        logic [63:0] beat;
        beat = m_data[b*64 +: 64];
        if (beat != '1) begin
          pg_nonff++;
          got_beats[cur_d]++;
          checks++;
          if (expq[cur_d].size() == 0 || expq[cur_d][0] != beat) begin
            failures++;
            if (failures < 10) $display("%0t dest %0d: unexpected beat %h (page %0d rpos %0d)", $time, ids[cur_d], beat, dut.u_tor.u_buf.r_pg, dut.u_tor.u_buf.mm_rpos[dut.u_tor.u_buf.rd]);
          end
          if (expq[cur_d].size() != 0) void'(expq[cur_d].pop_front());
        end
      end
      if (m_last) begin
        checks++;
        if (int'(m_useful) != pg_nonff) begin failures++; $display("page useful %0d, counted %0d", m_useful, pg_nonff); end
        pg_nonff = 0;
      end
    end
  end

  function automatic logic [7:0] pay(int f, int k);
    return 8'((f * 37 + k * 11 + (f ^ k)) % 255);
  endfunction

  task automatic send_frame(int f, int di, int len);
    int nb = (len + 7) / 8;
    for (int b = 0; b < nb; b++) begin
      logic [63:0] w;
      for (int k = 0; k < 8; k++) begin
        int i = b * 8 + k;
        if (i < 6)        w[k*8 +: 8] = (di == 0) ? 8'(20 + i) : macs[di][k*8 +: 8];
        else if (i < len) w[k*8 +: 8] = pay(f, i);
        else              w[k*8 +: 8] = 8'hFF;
      end
      expq[di].push_back(w);
      sent_beats[di]++;
      @(negedge clk);
      s_valid = 1; s_data = w; s_last = (b == nb - 1);
      s_bytes = (b == nb - 1) ? 4'(len - b * 8) : 4'd8;
      @(posedge clk);
      while (!s_ready) @(posedge clk);
    end
    @(negedge clk);
    s_valid = 0;
  endtask

  initial begin
    #(2 * 1500000);
    failures++;
    $display("watchdog expired");
    $display("ws_run %0d wd %0d rs_run %0d rd %0d grant_wr %0d", dut.u_tor.u_buf.ws_run, dut.u_tor.u_buf.wd, dut.u_tor.u_buf.rs_run, dut.u_tor.u_buf.rd, dut.u_tor.u_buf.grant_wr);
    for (int i = 0; i < 2048; i++) if (dut.u_tor.u_buf.mm_v[i]) $display("valid list at id %0d", i);
    for (int d = 0; d < ND; d++) $display("mm_v %0d first %0d last %0d rpos %0d", dut.u_tor.u_buf.mm_v[ids[d]], dut.u_tor.u_buf.mm_first[ids[d]], dut.u_tor.u_buf.mm_last[ids[d]], dut.u_tor.u_buf.mm_rpos[ids[d]]);
    for (int d = 0; d < ND; d++) $display("dest %0d: sent %0d got %0d left %0d", ids[d], sent_beats[d], got_beats[d], expq[d].size());
    $display("assign %0d release %0d stall %0d flush %0d fullburst %0d alloc %0d nopage %0d lock %0d empty %0d miss %0d free %0d",
             n_assign, n_release, n_stall, n_flush, n_full, n_alloc, n_nopage, n_lock, n_empty, n_miss, free_pages);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Schedule loader (big-endian words), started once the pages have run out.
  initial begin
    @(posedge rst_n);
    repeat (170000) @(negedge clk);
    for (int s = 0; s < 14; s++) begin
      logic [31:0] w;
      w = {7'(s), 11'(ids[tbl_dest[s]]), 6'(tbl_vlan[s]), 8'(tbl_wl[s])};
      @(negedge clk);
      rx_valid = 1; rx_data = {w[7:0], w[15:8], w[23:16], w[31:24]}; rx_last = (s == 13);
    end
    @(negedge clk); rx_valid = 0; rx_last = 0;
  end

  initial begin
    int f = 0;
    for (int d = 0; d < ND; d++) begin sent_beats[d] = 0; got_beats[d] = 0; end
    for (int d = 0; d < ND; d++) macs[d] = 48'h0A0B0C000000 + 48'(d * 4097);
    for (int s = 0; s < 14; s++) begin
      tbl_dest[s] = s % ND; tbl_vlan[s] = (s * 5) % 64; tbl_wl[s] = (s * 3 + 1) % 256;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // MAC table: all destinations but tag 0 (reached through a miss).
    for (int d = 1; d < ND; d++) begin
      @(negedge clk); cfg_we = 1; cfg_valid = 1; cfg_idx = 11'(ids[d]); cfg_mac = macs[d];
    end
    @(negedge clk); cfg_we = 0;
    // Phase 1: traffic while the schedule is not yet loaded; the pages run out.
    for (; f < 1700; f++) send_frame(f, (f / 8 + f / 61) % ND, 64 + (f * 53) % 1437);
    // Phase 2: traffic while slots run.
    for (; f < 1900; f++) begin
      send_frame(f, (f * 5 + f / 3) % ND, 16 + (f * 29) % 1500);
      repeat (f % 97) @(negedge clk);
    end
    // Drain.
    begin
      int left;
      do begin
        repeat (SC) @(negedge clk);
        left = 0;
        for (int d = 0; d < ND; d++) left += expq[d].size();
      end while (left != 0);
    end
    repeat (3 * SC) @(negedge clk);   // remaining slots must now be empty
    while (!cnn_finished) @(negedge clk);
    checks++;
    if (n_c1 != 2 * 32 * 76 * 76 || n_p1 != 2 * 32 * 19 * 19 || n_c2 != 2 * 32 * 16 * 16 ||
        n_p2 != 2 * 512 || n_fc != 2 || n_done != 2) begin
      failures++;
      $display("CNN stage counts %0d %0d %0d %0d %0d %0d", n_c1, n_p1, n_c2, n_p2, n_fc, n_done);
    end
    checks++;
    if (cnn_cyc[0] != cnn_cyc[1] || cnn_res[0][0] != cnn_res[1][0] || cnn_res[0][1] != cnn_res[1][1]) begin
      failures++; $display("CNN runs differ");
    end
    checks++;
    if (cnn_cyc[0] < 32 * 76 * 76 || cnn_cyc[0] > 185490 * 11 / 10) begin
      failures++; $display("CNN latency %0d cycles outside [%0d, %0d]", cnn_cyc[0], 32 * 76 * 76, 185490 * 11 / 10);
    end
    for (int d = 0; d < ND; d++) begin
      checks++;
      if (got_beats[d] != sent_beats[d]) begin failures++; $display("dest %0d: sent %0d beats, got %0d", ids[d], sent_beats[d], got_beats[d]); end
    end
    checks++;
    if (free_pages != NPG) begin failures++; $display("free pages %0d", free_pages); end
    checks++;
    if (max_win > TL) begin failures++; $display("lock window of %0d cycles", max_win); end
    $display("longest contested lock window %0d cycles", max_win);
    $display("assign %0d release %0d stall %0d flush %0d fullburst %0d alloc %0d nopage %0d lock %0d empty %0d miss %0d",
             n_assign, n_release, n_stall, n_flush, n_full, n_alloc, n_nopage, n_lock, n_empty, n_miss);
    checks++; if (n_assign == 0) failures++;
    checks++; if (n_release == 0) failures++;
    checks++; if (n_stall == 0) failures++;
    checks++; if (n_flush == 0) failures++;
    checks++; if (n_full == 0) failures++;
    checks++; if (n_alloc == 0) failures++;
    checks++; if (n_nopage == 0) failures++;
    checks++; if (n_lock == 0) failures++;
    checks++; if (n_empty == 0) failures++;
    checks++; if (n_miss == 0) failures++;
    $display("CNN: conv1 %0d pool1 %0d conv2 %0d pool2 %0d fc %0d done %0d", n_c1, n_p1, n_c2, n_p2, n_fc, n_done);
    checks++; if (n_c1 == 0 || n_p1 == 0 || n_c2 == 0 || n_p2 == 0 || n_fc == 0 || n_done == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
