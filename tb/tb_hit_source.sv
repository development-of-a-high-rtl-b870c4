// tb_hit_source: self-checking test of the event-replay memory.
//
// Fills 37 words with random contents, plays them with length 37 while the consumer
// applies random stalls, and checks that the accepted words are the memory contents in
// order, wrapping to word 0, that a stalled word is held, that the loop counter counts
// the passes, and that one word per cycle is delivered when the consumer never stalls.
module tb_hit_source;
  import ar_pkg::*;

  localparam int LINES = 2, WORDS = 64, LEN = 37;

  logic clk = 0, rst_n = 0;
  logic wr_en;
  logic [5:0] wr_addr;
  logic [LINES-1:0] wr_valid;
  hit_t wr_hit [LINES];
  logic wr_eoe;
  logic run;
  logic [6:0] length;
  logic out_valid, out_ready;
  logic [LINES-1:0] out_hvalid;
  hit_t out_hit [LINES];
  logic out_eoe;
  logic [31:0] loops;

  int checks = 0, failures = 0, cycle = 0;
  logic [LINES-1:0] m_valid [LEN];
  hit_t m_hit [LEN][LINES];
  logic m_eoe [LEN];

  hit_source #(.LINES(LINES), .WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int taken = 0, stalls = 0, held_ok = 0;
  bit random_stall = 1;
  int first_free = -1;
  logic [LINES-1:0] last_v;
  hit_t last_h [LINES];
  logic last_e;
  bit was_stalled = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (was_stalled) begin
        checks++;
        if (out_hvalid !== last_v || out_hit !== last_h || out_eoe !== last_e) begin
          failures++;
          $display("stalled word changed");
        end else held_ok++;
      end
      if (out_ready) begin
        int i;
        i = taken % LEN;
        checks++;
        if (out_hvalid !== m_valid[i] || out_hit !== m_hit[i] || out_eoe !== m_eoe[i]) begin
          failures++;
          $display("word %0d differs", i);
        end
        taken++;
        was_stalled = 0;
      end else begin
        stalls++;
        was_stalled = 1;
        last_v = out_hvalid; last_h = out_hit; last_e = out_eoe;
      end
    end
  end

  always @(negedge clk) out_ready <= random_stall ? ($urandom_range(0, 2) != 0) : 1'b1;

  initial begin
    wr_en = 0; wr_addr = '0; wr_valid = '0; wr_eoe = 0; run = 0; length = 7'(LEN);
    for (int l = 0; l < LINES; l++) wr_hit[l] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int a = 0; a < LEN; a++) begin
      m_valid[a] = LINES'($urandom);
      m_eoe[a] = $urandom_range(0, 3) == 0;
      for (int l = 0; l < LINES; l++) m_hit[a][l] = hit_t'($urandom);
      wr_en = 1; wr_addr = 6'(a); wr_valid = m_valid[a]; wr_eoe = m_eoe[a]; wr_hit = m_hit[a];
      @(posedge clk); #1;
    end
    wr_en = 0;
    run = 1;
    wait (taken >= 3 * LEN + 5);
    @(posedge clk); #1;
    checks++;
    if (loops != 3) begin
      failures++;
      $display("loops = %0d, expected 3", loops);
    end
    // no stalls: one word per cycle
    random_stall = 0;
    repeat (3) @(posedge clk);
    begin
      int t0, c0;
      t0 = taken; c0 = cycle;
      repeat (50) @(posedge clk);
      checks++;
      if (taken - t0 != 50) begin
        failures++;
        $display("%0d words in 50 cycles", taken - t0);
      end
    end
    checks++;
    if (stalls < 10 || held_ok < 10) begin
      failures++;
      $display("too few stalls exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
