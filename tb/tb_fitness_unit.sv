// tb_fitness_unit - self-checking testbench of the fitness unit.
//
// An 8 x 6 training image pair sits in two synchronous SRAM models. The
// testbench plays the control unit: on each eval_start it writes a new random
// set of four bitstreams, column c in cycle eval_start+1+c. Every reported
// evaluation must carry the reference fitness of each of the four candidates,
// the minimum and the index of the first VRC holding it, and results must come
// exactly one image pass (W*H cycles) apart.
module tb_fitness_unit;
  import cgp_pkg::*;
  import cgp_ref_pkg::*;

  localparam int W = 8, H = 6, AW = $clog2(W * H), NEVAL = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic run = 0;
  logic [AW-1:0] sram1_addr, sram2_addr;
  logic sram1_re, sram2_re;
  logic [7:0] sram1_rdata, sram2_rdata;
  logic eval_start, cfg_we = 0;
  logic [2:0] cfg_col;
  logic [3:0][63:0] cfg_data;
  logic res_valid;
  logic [23:0] res_fit;
  logic [1:0] res_idx;
  logic [3:0][23:0] res_fits;

  fitness_unit #(.W(W), .H(H)) dut (.clk, .rst_n, .run, .sram1_addr, .sram1_re,
    .sram1_rdata, .sram2_addr, .sram2_re, .sram2_rdata, .eval_start, .cfg_we, .cfg_col,
    .cfg_data, .res_valid, .res_fit, .res_idx, .res_fits);

  byte unsigned img[], tgt[];
  always_ff @(posedge clk) begin
    if (sram1_re) sram1_rdata <= img[sram1_addr];
    if (sram2_re) sram2_rdata <= tgt[sram2_addr];
  end

  int checks = 0, failures = 0;
  typedef logic [3:0][RCOLS-1:0][63:0] set_t;   // four bitstreams
  set_t sets [$];
  int nres = 0, last_res = -1, cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (W * H * (NEVAL + 4) + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // control-unit stand-in: configuration wave after each eval_start
  initial begin
    forever begin
      set_t s;
      @(posedge clk);
      if (eval_start) begin
        for (int i = 0; i < 4; i++) s[i] = rand_bitstream();
        if (sets.size() == 2) s[2] = s[1];       // a tie now and then
        sets.push_back(s);
        for (int c = 0; c < 8; c++) begin
          @(negedge clk);
          cfg_we = 1; cfg_col = 3'(c);
          for (int i = 0; i < 4; i++) cfg_data[i] = s[i][c];
        end
        @(negedge clk); cfg_we = 0;
      end
    end
  end

  initial begin
    img = new[W * H]; tgt = new[W * H];
    foreach (img[i]) begin img[i] = 8'($urandom); tgt[i] = 8'($urandom); end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); run = 1;
    while (nres < NEVAL) begin
      @(posedge clk); #1;
      if (res_valid) begin
        set_t s;
        int f[4], m, mi;
        s = sets[0];
        sets.delete(0);
        m = 1 << 30; mi = 0;
        for (int i = 0; i < 4; i++) begin
          f[i] = ref_fitness(s[i], W, H, img, tgt);
          if (f[i] < m) begin m = f[i]; mi = i; end
          checks++;
          if (int'(res_fits[i]) != f[i]) begin
            failures++;
            $display("eval %0d VRC %0d: fit %0d exp %0d", nres, i, res_fits[i], f[i]);
          end
        end
        checks++;
        if (int'(res_fit) != m || int'(res_idx) != mi) failures++;
        if (last_res >= 0) begin
          checks++;
          if (cyc - last_res != W * H) begin
            failures++;
            $display("result interval %0d, expected %0d", cyc - last_res, W * H);
          end
        end
        last_res = cyc;
        nres++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
