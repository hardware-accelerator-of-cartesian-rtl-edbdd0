// tb_cgp_accel - end-to-end testbench of the accelerator at its default size.
//
// Workload: evolution of a 3x3 noise filter on a 128 x 128 image. The required
// image is a smooth synthetic picture; the input image is the same picture
// with 10 % salt-and-pepper noise. Both sit in synchronous SRAM models.
//
// The testbench plays the embedded processor. It runs one independent
// 1+4 evolution strategy per bank. For each generation it writes the first
// offspring into section 1 and, for offspring 2..4, only their difference to
// the first offspring into sections 2..4, writing just the 32-bit words that
// change; then it sets the bank's valid bit. On each interrupt it reads the
// result of every finished bank and checks the best fitness and VRC index
// against the reference model. It then forms the new parent in section 1:
// if the best offspring is worse than the parent, the first offspring's
// mutations are undone; otherwise, if the best is offspring i > 1, section i
// is XORed into section 1; if it is offspring 1 nothing is done. Section 1
// is read back and compared with the expected parent.
//
// Mutation strength varies with the generation so that every case occurs.
// Counted mechanisms (each must occur at least once): stalled passes, both
// banks evaluated, back-to-back evaluations exactly one image pass apart,
// non-zero difference sections, revert, difference applied, first offspring
// kept.
module tb_cgp_accel;
  import cgp_pkg::*;
  import cgp_ref_pkg::*;

  localparam int W = IMG_W, H = IMG_H, AW = $clog2(W * H);
  localparam int NGEN = 12;             // generations per bank
  localparam int NBK  = NB;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ppc_we = 0, ppc_re = 0;
  logic [PPC_AW-1:0] ppc_addr = '0;
  logic [31:0] ppc_wdata = '0, ppc_rdata;
  logic irq;
  logic [AW-1:0] sram1_addr, sram2_addr;
  logic sram1_re, sram2_re;
  logic [7:0] sram1_rdata, sram2_rdata;

  cgp_accel dut (.clk, .rst_n, .ppc_we, .ppc_re, .ppc_addr, .ppc_wdata, .ppc_rdata, .irq,
                 .sram1_addr, .sram1_re, .sram1_rdata, .sram2_addr, .sram2_re, .sram2_rdata);

  byte unsigned img[], tgt[];
  always_ff @(posedge clk) begin
    if (sram1_re) sram1_rdata <= img[sram1_addr];
    if (sram2_re) sram2_rdata <= tgt[sram2_addr];
  end

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  // mechanism counters
  int n_revert = 0, n_apply = 0, n_keep = 0, n_b2b = 0, n_diffw = 0;
  int n_eval [NBK];
  int n_writes = 0;

  // processor-side state
  logic [63:0] memw [NBK][4][8];        // what the population memory holds
  bitstream_t  par  [NBK];
  int          fpar [NBK];
  bitstream_t  off  [NBK][4];
  int          m1_bits [NBK][$];
  int          gen  [NBK];
  bit          busy [NBK];

  initial begin
    repeat (W * H * (2 * NGEN + 6)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ppc_wr(input int a, input logic [31:0] d);
    @(negedge clk); ppc_we = 1; ppc_addr = PPC_AW'(a); ppc_wdata = d;
    @(negedge clk); ppc_we = 0;
    n_writes++;
  endtask

  task automatic ppc_rd(input int a, output logic [31:0] d);
    @(negedge clk); ppc_re = 1; ppc_addr = PPC_AW'(a);
    @(posedge clk); #1; d = ppc_rdata;
    @(negedge clk); ppc_re = 0;
  endtask

  function automatic int waddr(input int s, input int b, input int c, input int h);
    return s * SEC_STRIDE + (b * VRC_COLS + c) * 2 + h;
  endfunction

  // write the 32-bit words of section s of bank b that differ from bs
  task automatic put_section(input int b, input int s, input bitstream_t bs);
    for (int c = 0; c < 8; c++)
      for (int h = 0; h < 2; h++)
        if (memw[b][s][c][32*h +: 32] != bs[c][32*h +: 32]) begin
          ppc_wr(waddr(s, b, c, h), bs[c][32*h +: 32]);
          memw[b][s][c][32*h +: 32] = bs[c][32*h +: 32];
        end
  endtask

  function automatic bitstream_t flip(input bitstream_t bs, input int k);
    bs[k / 48][k % 48] = ~bs[k / 48][k % 48];
    return bs;
  endfunction

  // new generation for bank b from its parent
  task automatic new_generation(input int b);
    int h1, hn, g;
    bitstream_t diff;
    g = gen[b];
    h1 = (g % 4 == 1) ? 30 : (g % 4 == 3) ? 100 : 2;  // mutations of offspring 1
    hn = (g % 4 == 2) ? 30 : (g % 4 == 3) ? 100 : 2;  // mutations of offspring 2..4
    if (g % 4 == 2) h1 = 1;
    m1_bits[b].delete();
    off[b][0] = par[b];
    for (int j = 0; j < h1; j++) begin
      int k;
      k = int'($urandom % 384);
      m1_bits[b].push_back(k);
      off[b][0] = flip(off[b][0], k);
    end
    for (int i = 1; i < 4; i++) begin
      off[b][i] = par[b];
      for (int j = 0; j < hn; j++) off[b][i] = flip(off[b][i], int'($urandom % 384));
    end
    put_section(b, 0, off[b][0]);
    for (int i = 1; i < 4; i++) begin
      diff = off[b][0] ^ off[b][i];
      if (diff != '0) n_diffw++;
      put_section(b, i, diff);
    end
    ppc_wr(REG_BASE + REG_VALID, 32'(1) << b);
    busy[b] = 1;
  endtask

  // result of bank b: check it, form the new parent in section 1
  task automatic finish_generation(input int b);
    logic [31:0] r;
    int f[4], m, mi, fb, ib;
    bitstream_t s1, exp_par;
    ppc_rd(REG_BASE + REG_RESULT + b, r);
    fb = int'(r[23:0]); ib = int'(r[27:24]);
    m = 1 << 30; mi = 0;
    for (int i = 0; i < 4; i++) begin
      f[i] = ref_fitness(off[b][i], W, H, img, tgt);
      if (f[i] < m) begin m = f[i]; mi = i; end
    end
    checks++;
    if (!r[31] || fb != m || ib != mi) begin
      failures++;
      $display("bank %0d gen %0d: result %0d/%0d exp %0d/%0d (%0d %0d %0d %0d)",
               b, gen[b], fb, ib, m, mi, f[0], f[1], f[2], f[3]);
    end
    n_eval[b]++;
    // new parent
    s1 = off[b][0];
    if (fb > fpar[b]) begin
      // undo the first offspring's mutations, last one first
      for (int j = m1_bits[b].size() - 1; j >= 0; j--) s1 = flip(s1, m1_bits[b][j]);
      exp_par = par[b];
      n_revert++;
    end else begin
      if (ib > 0) begin
        for (int c = 0; c < 8; c++) s1[c] = s1[c] ^ memw[b][ib][c];
        n_apply++;
      end else begin
        n_keep++;
      end
      exp_par = off[b][ib];
      fpar[b] = fb;
    end
    put_section(b, 0, s1);
    // read section 1 back and compare with the expected parent
    for (int c = 0; c < 8; c++)
      for (int h = 0; h < 2; h++) begin
        logic [31:0] d;
        ppc_rd(waddr(0, b, c, h), d);
        checks++;
        if (d != exp_par[c][32*h +: 32]) failures++;
      end
    par[b] = exp_par;
    busy[b] = 0;
    gen[b]++;
  endtask

  initial begin
    logic [31:0] v, d;
    int last_irq = -1, done_banks;
    // training images
    img = new[W * H]; tgt = new[W * H];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int p;
        p = (r * 2 + c) % 256;
        if (((r / 16) + (c / 16)) % 2 == 1) p = 255 - p;
        tgt[r * W + c] = 8'(p);
        case ($urandom % 20)
          0:       img[r * W + c] = 8'd0;
          1:       img[r * W + c] = 8'd255;
          default: img[r * W + c] = 8'(p);
        endcase
      end
    for (int b = 0; b < NBK; b++) begin
      par[b] = rand_bitstream(); fpar[b] = 1 << 30; gen[b] = 0; busy[b] = 0; n_eval[b] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // population memory content is unknown after power-up: write it all once
    for (int b = 0; b < NBK; b++)
      for (int s = 0; s < 4; s++)
        for (int c = 0; c < 8; c++)
          for (int h = 0; h < 2; h++) begin
            ppc_wr(waddr(s, b, c, h), '0);
            memw[b][s][c][32*h +: 32] = '0;
          end
    ppc_wr(REG_BASE + REG_CTRL, 1);
    // let at least one pass go by with no valid bank
    repeat (W * H) @(posedge clk);
    for (int b = 0; b < NBK; b++) new_generation(b);
    done_banks = 0;
    while (done_banks < NBK) begin
      @(posedge clk);
      if (irq) begin
        if (last_irq >= 0 && cyc - last_irq == W * H) n_b2b++;
        last_irq = cyc;
        ppc_rd(REG_BASE + REG_VALID, v);
        for (int b = 0; b < NBK; b++)
          if (busy[b] && !v[b]) begin
            finish_generation(b);
            if (gen[b] < NGEN) new_generation(b);
            else done_banks++;
          end
      end
    end
    ppc_rd(REG_BASE + REG_EVALS, d);
    checks++; if (int'(d) != NBK * NGEN) failures++;
    ppc_rd(REG_BASE + REG_STALLS, d);
    $display("stalls=%0d revert=%0d apply=%0d keep=%0d back_to_back=%0d diff_sections=%0d bank0=%0d bank1=%0d writes=%0d parent fitness %0d %0d",
             d, n_revert, n_apply, n_keep, n_b2b, n_diffw, n_eval[0], n_eval[1], n_writes,
             fpar[0], fpar[1]);
    checks++; if (d == 0) failures++;
    checks++; if (n_revert == 0) failures++;
    checks++; if (n_apply == 0) failures++;
    checks++; if (n_keep == 0) failures++;
    checks++; if (n_b2b == 0) failures++;
    checks++; if (n_diffw == 0) failures++;
    checks++; if (n_eval[0] == 0 || n_eval[1] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
