// tb_spad_array: self-checking test of the random-photon SPAD array model.
//
// A reference model (spad_ref_pkg) predicts every pixel's LFSR and hit latch.
// The test runs phases with rate 0 (no photons may appear), full rate, and
// random rates, with random row reads, and compares all 32 hit bits after
// every clock. It also checks the behaviour a SPAD pixel must show: a fired
// pixel holds its hit until read, a photon on a fired pixel is lost, and a
// photon in the read clock survives to the next read; each of these must be
// seen at least once. The measured hit fraction at a fixed rate is checked
// against the programmed probability.
module tb_spad_array;
  import spad_ref_pkg::*;
  localparam int COLS = 16, ROWS = 2;
  localparam logic [15:0] SEED = 16'hACE1;

  int checks = 0, failures = 0;
  int n_held = 0, n_lost = 0, n_kept = 0;
  logic clk = 0, rst_n;
  logic [7:0] rate;
  logic [ROWS-1:0] row_rd;
  logic [ROWS-1:0][COLS-1:0] hit;

  logic [15:0] m_lfsr [ROWS][COLS];
  logic        m_hit  [ROWS][COLS];

  spad_array dut (.clk, .rst_n, .rate, .row_rd, .hit);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Advance the model by one clock with the inputs now applied.
  task automatic model_step();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        logic ph = m_lfsr[r][c][7:0] < rate;
        if (ph && m_hit[r][c] && !row_rd[r]) n_lost++;
        if (ph && row_rd[r]) n_kept++;
        if (m_hit[r][c] && !row_rd[r]) n_held++;
        m_hit[r][c]  = row_rd[r] ? ph : (m_hit[r][c] | ph);
        m_lfsr[r][c] = ref_step(m_lfsr[r][c]);
      end
  endtask

  task automatic compare(input string tag);
    checks++;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        if (hit[r][c] !== m_hit[r][c]) begin
          failures++;
          $display("FAIL %s: pixel (%0d,%0d) hit=%0d expected %0d", tag, r, c,
                   hit[r][c], m_hit[r][c]);
          return;
        end
  endtask

  task automatic run(input int cycles, input int rate_mode, input string tag);
    // called at a falling edge; returns at a falling edge
    for (int i = 0; i < cycles; i++) begin
      rate   = (rate_mode < 0) ? 8'($urandom) : 8'(rate_mode);
      row_rd = 2'($urandom);
      @(posedge clk);
      model_step();
      @(negedge clk);
      compare(tag);
    end
  endtask

  initial begin
    int ones, samples;
    rst_n = 0; rate = 0; row_rd = 0;
    @(posedge clk);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        m_lfsr[r][c] = ref_seed(SEED, r * COLS + c + 1);
        m_hit[r][c]  = 1'b0;
      end
    @(negedge clk);
    compare("reset");
    rst_n = 1;
    run(300, 0, "rate0");
    checks++;
    if (hit != '0) begin failures++; $display("FAIL: hits at rate 0"); end
    run(300, 255, "rate255");
    run(3000, -1, "random");
    // statistical check: read both rows every clock at rate 64 (p = 1/4)
    ones = 0; samples = 0;
    for (int i = 0; i < 2000; i++) begin
      rate = 8'd64; row_rd = 2'b11;
      @(posedge clk);
      model_step();
      @(negedge clk);
      compare("stat");
      ones += ref_popcount(64'(hit)); samples += ROWS * COLS;
    end
    checks++;
    if (ones * 100 < samples * 22 || ones * 100 > samples * 28) begin
      failures++;
      $display("FAIL: hit fraction %0d/%0d not near 1/4", ones, samples);
    end
    checks++;
    if (n_held == 0 || n_lost == 0 || n_kept == 0) begin
      failures++;
      $display("FAIL: held=%0d lost=%0d kept=%0d, each must occur", n_held, n_lost, n_kept);
    end
    $display("held=%0d lost=%0d kept=%0d fraction=%0d/%0d", n_held, n_lost, n_kept, ones, samples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
