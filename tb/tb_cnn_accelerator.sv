// tb_cnn_accelerator: end-to-end check of the vessel-detection CNN at its
// full size. A pseudo-random 80x80x3 image is written, the accelerator is
// started, and every value leaving the first convolution layer, the first
// pooling layer, the second convolution layer and the fully connected layer,
// plus both class scores, is compared with a bit-accurate reference model
// computed here from the same weight function. The start-to-done cycle count
// is checked against the first layer's window count NF*76*76 plus the
// second-layer tail and readout. Two images are classified back to back.
module tb_cnn_accelerator;
  import cnn_pkg::*;
  localparam int IMG = 80, NF = 32, FC_N = 128, NC = 2;
  localparam int C1 = 76, P1 = 19, C2 = 16, P2 = 4, NIN = 512;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic img_we = 0, start = 0, busy, done, is_ship;
  logic [1:0] img_ch = 0;
  logic [6:0] img_row = 0;
  logic [IMG*8-1:0] img_data = '0;
  act_t score [NC];

  cnn_accelerator dut (.*);

  int checks = 0, failures = 0;
  int pix [3][IMG][IMG];
  int r1 [NF][C1][C1];
  int rp1 [NF][P1][P1];
  int r2 [NF][C2][C2];
  int rv [NIN];
  int rfc [FC_N];
  int rs [NC];

  function automatic int wrap(longint x);
    logic [ACT_W-1:0] t;
    t = x[ACT_W-1:0];
    return int'($signed(t));
  endfunction
  function automatic int rl(int x); return x < 0 ? 0 : x; endfunction

  // Loop bounds held in variables keep the reference loops from being
  // unrolled at compile time.
  int vNF = NF, vC1 = C1, vP1 = P1, vC2 = C2, vP2 = P2, v3 = 3, v5 = 5, v4 = 4;
  int vFC = FC_N, vNIN = NIN, vNC = NC;
  task automatic model();
    for (int f = 0; f < vNF; f++)
      for (int y = 0; y < vC1; y++)
        for (int x = 0; x < vC1; x++) begin
          longint s = cnn_weight(T_BIAS1, f, 0, 0);
          for (int c = 0; c < v3; c++)
            for (int i = 0; i < v5; i++)
              for (int j = 0; j < v5; j++)
                s += pix[c][y+i][x+j] * cnn_weight(T_CONV1, f, c, i*5+j);
          r1[f][y][x] = rl(wrap(s));
        end
    for (int f = 0; f < vNF; f++)
      for (int y = 0; y < vP1; y++)
        for (int x = 0; x < vP1; x++) begin
          int m = -1000000;
          for (int i = 0; i < v4; i++)
            for (int j = 0; j < v4; j++) if (r1[f][4*y+i][4*x+j] > m) m = r1[f][4*y+i][4*x+j];
          rp1[f][y][x] = m;
        end
    for (int g = 0; g < vNF; g++)
      for (int y = 0; y < vC2; y++)
        for (int x = 0; x < vC2; x++) begin
          longint s = cnn_weight(T_BIAS2, g, 0, 0);
          for (int m = 0; m < vNF; m++)
            for (int i = 0; i < v4; i++)
              for (int j = 0; j < v4; j++)
                s += (rp1[m][y+i][x+j] * cnn_weight(T_CONV2, g, m, i*4+j)) >>> 6;
          r2[g][y][x] = rl(wrap(s));
        end
    for (int g = 0; g < vNF; g++)
      for (int y = 0; y < vP2; y++)
        for (int x = 0; x < vP2; x++) begin
          int m = -1000000;
          for (int i = 0; i < v4; i++)
            for (int j = 0; j < v4; j++) if (r2[g][4*y+i][4*x+j] > m) m = r2[g][4*y+i][4*x+j];
          rv[g*16 + y*4 + x] = m;
        end
    for (int n = 0; n < vFC; n++) begin
      longint s = cnn_weight(T_FCB, n, 0, 0);
      for (int i = 0; i < vNIN; i++) s += (rv[i] * cnn_weight(T_FC, n, i, 0)) >>> 6;
      rfc[n] = rl(wrap(s));
    end
    for (int c = 0; c < vNC; c++) begin
      longint s = cnn_weight(T_OUTB, c, 0, 0);
      for (int n = 0; n < vFC; n++) s += (rfc[n] * cnn_weight(T_OUT, c, n, 0)) >>> 6;
      rs[c] = wrap(s);
    end
  endtask

  // Stream monitors on the layer outputs.
  int n1, np1, n2, bad1, badp1, bad2;
  always @(posedge clk) if (dut.c1_v) begin
    int f, y, x;
    f = n1 / (C1*C1); y = (n1 / C1) % C1; x = n1 % C1;
    if (n1 < NF*C1*C1 && int'(dut.c1_d) != r1[f][y][x]) bad1++;
    n1++;
  end
  always @(posedge clk) if (dut.p1_v) begin
    int f, y, x;
    f = np1 / (P1*P1); y = (np1 / P1) % P1; x = np1 % P1;
    if (np1 < NF*P1*P1 && int'(dut.p1_d) != rp1[f][y][x]) badp1++;
    np1++;
  end
  always @(posedge clk) if (dut.c2_v) begin
    int g, y, x;
    g = n2 / (C2*C2); y = (n2 / C2) % C2; x = n2 % C2;
    if (n2 < NF*C2*C2 && int'(dut.c2_d) != r2[g][y][x]) bad2++;
    n2++;
  end

  int cyc;
  initial begin
    #(2 * 600000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int img = 0; img < 2; img++) begin
      for (int c = 0; c < 3; c++)
        for (int y = 0; y < IMG; y++)
          for (int x = 0; x < IMG; x++) pix[c][y][x] = (c * 7919 + y * 131 + x * 17 + img * 50 + (x * y) % 23) % 256;
      model();
      for (int c = 0; c < 3; c++)
        for (int y = 0; y < IMG; y++) begin
          @(negedge clk);
          img_we = 1; img_ch = 2'(c); img_row = 7'(y);
          for (int x = 0; x < IMG; x++) img_data[x*8 +: 8] = 8'(pix[c][y][x]);
        end
      @(negedge clk); img_we = 0;
      n1 = 0; np1 = 0; n2 = 0; bad1 = 0; badp1 = 0; bad2 = 0;
      start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++; if (n1 != NF*C1*C1 || bad1 != 0) begin failures++; $display("conv1: %0d values, %0d wrong", n1, bad1); end
      checks++; if (np1 != NF*P1*P1 || badp1 != 0) begin failures++; $display("pool1: %0d values, %0d wrong", np1, badp1); end
      checks++; if (n2 != NF*C2*C2 || bad2 != 0) begin failures++; $display("conv2: %0d values, %0d wrong", n2, bad2); end
      for (int n = 0; n < FC_N; n++) begin
        checks++;
        if (int'(dut.fc_y[n]) != rfc[n]) begin failures++; if (failures < 10) $display("fc %0d: %0d vs %0d", n, dut.fc_y[n], rfc[n]); end
      end
      for (int c = 0; c < NC; c++) begin
        checks++;
        if (int'(score[c]) != rs[c]) begin failures++; $display("score %0d: %0d vs %0d", c, score[c], rs[c]); end
      end
      checks++; if (is_ship != (rs[1] > rs[0])) failures++;
      // First layer: NF*76*76 = 184832 window cycles; tail and readout after it.
      checks++;
      if (cyc < NF*C1*C1 + NF*C2*C2 || cyc > NF*C1*C1 + NF*C2*C2 + 1000) begin
        failures++; $display("cycle count %0d out of range", cyc);
      end
      $display("image %0d: %0d cycles start to done (first layer alone %0d); scores %0d %0d", img, cyc, NF*C1*C1, score[0], score[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
