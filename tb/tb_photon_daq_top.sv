// tb_photon_daq_top: end-to-end test of the 16x2 photon counting system.
//
// Runs the top with all parameters at their defaults. A reference model built
// on spad_ref_pkg predicts every pixel of the random SPAD array, reads row 0
// and row 1 in alternate enabled clocks, adds the photons of each read to a
// saturating 16-bit count and closes a frame every frame_len enabled clocks.
// After every clock the testbench compares count_valid, frame_no and, when a
// frame closes, count_out and overflow_out with the model.
//
// Phases: short frames at low, medium and zero photon rate, acquisition paused
// and resumed inside a frame, a frame length changed on the fly, and long
// frames at a high rate that overflow the 16-bit count. Every mechanism must
// occur at least once or a failure is counted: reads of each row carrying
// photons, finished frames, a saturated frame, a frame with zero photons,
// paused clocks, photons lost on an already fired pixel, and pixels holding
// their hit while the other row is read.
module tb_photon_daq_top;
  import spad_ref_pkg::*;
  localparam int COLS = 16, ROWS = 2;
  localparam logic [15:0] SEED = 16'hACE1;

  int checks = 0, failures = 0;
  int n_read[ROWS] = '{0, 0};
  int n_frames = 0, n_ovf = 0, n_empty = 0, n_pause = 0, n_lost = 0, n_held = 0;

  logic        clk = 0, rst_n, en;
  logic [7:0]  rate;
  logic [19:0] frame_len;
  logic [15:0] count_out, frame_no;
  logic        overflow_out, count_valid;

  // reference state
  logic [15:0] m_lfsr [ROWS][COLS];
  logic        m_hit  [ROWS][COLS];
  int          m_row, m_cyc, m_acc, m_frames;
  logic        m_ovf, m_valid;
  int          m_out;
  logic        m_out_ovf;

  photon_daq_top dut (
    .clk, .rst_n, .en, .rate, .frame_len,
    .count_out, .overflow_out, .count_valid, .frame_no
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_reset();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        m_lfsr[r][c] = ref_seed(SEED, r * COLS + c + 1);
        m_hit[r][c]  = 1'b0;
      end
    m_row = 0; m_cyc = 0; m_acc = 0; m_frames = 0;
    m_ovf = 0; m_valid = 0; m_out = 0; m_out_ovf = 0;
  endtask

  // One clock of the system with the inputs now applied.
  task automatic model_step();
    int  n = 0, len;
    logic fend;
    m_valid = 0;
    if (en) begin
      for (int c = 0; c < COLS; c++) n += int'(m_hit[m_row][c]);
      if (n > 0) n_read[m_row]++;
      m_acc += n;
      if (m_acc > 65535) begin m_acc = 65535; m_ovf = 1; end
      if (m_ovf) m_acc = 65535;
      len  = (frame_len == 0) ? 1 : int'(frame_len);
      fend = (m_cyc + 1 >= len);
      if (fend) begin
        m_out = m_acc; m_out_ovf = m_ovf; m_valid = 1;
        m_acc = 0; m_ovf = 0; m_cyc = 0; m_frames++;
        n_frames++;
        if (m_out_ovf) n_ovf++;
        if (m_out == 0) n_empty++;
      end else begin
        m_cyc++;
      end
    end else begin
      n_pause++;
    end
    for (int r = 0; r < ROWS; r++) begin
      logic rd = en && (r == m_row);
      for (int c = 0; c < COLS; c++) begin
        logic ph = m_lfsr[r][c][7:0] < rate;
        if (ph && m_hit[r][c] && !rd) n_lost++;
        if (m_hit[r][c] && !rd && en) n_held++;
        m_hit[r][c]  = rd ? ph : (m_hit[r][c] | ph);
        m_lfsr[r][c] = ref_step(m_lfsr[r][c]);
      end
    end
    if (en) m_row = (m_row + 1) % ROWS;
  endtask

  task automatic compare();
    checks++;
    if (count_valid !== m_valid || frame_no !== 16'(m_frames)) begin
      failures++;
      $display("FAIL t=%0t valid=%0d/%0d frame_no=%0d/%0d", $time, count_valid, m_valid,
               frame_no, m_frames);
    end
    if (m_valid) begin
      checks++;
      if (count_out !== 16'(m_out) || overflow_out !== m_out_ovf) begin
        failures++;
        $display("FAIL frame %0d: count=%0d ovf=%0d, expected %0d ovf=%0d", m_frames,
                 count_out, overflow_out, m_out, m_out_ovf);
      end
    end
  endtask

  // Run at a falling edge, return at a falling edge.
  task automatic run(input int cycles, input int r, input int len, input int pause_pct);
    for (int i = 0; i < cycles; i++) begin
      rate      = 8'(r);
      frame_len = 20'(len);
      en        = ($urandom % 100) >= pause_pct;
      @(posedge clk);
      model_step();
      @(negedge clk);
      compare();
    end
  endtask

  initial begin
    rst_n = 0; en = 0; rate = 0; frame_len = 20'd8;
    @(posedge clk);
    model_reset();
    @(negedge clk);
    compare();
    rst_n = 1;
    run(200, 3, 10, 0);        // sparse photons, short frames
    run(200, 0, 7, 0);         // no photons: empty frames
    run(600, 40, 25, 20);      // medium rate with pauses
    run(300, 128, 33, 0);      // frame length changed on the fly
    run(11000, 250, 5000, 0);  // long frames at high rate: saturation
    run(300, 20, 16, 5);       // back to normal after saturation
    checks++;
    if (n_read[0] == 0 || n_read[1] == 0 || n_frames < 10 || n_ovf == 0 || n_empty == 0 ||
        n_pause == 0 || n_lost == 0 || n_held == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    $display("row0 reads=%0d row1 reads=%0d frames=%0d saturated=%0d empty=%0d paused=%0d lost=%0d held=%0d",
             n_read[0], n_read[1], n_frames, n_ovf, n_empty, n_pause, n_lost, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
