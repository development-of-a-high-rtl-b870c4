// tb_dispatcher: self-checking test of the switching network.
//
// Loads a random routing table (kept also in the testbench), then drives random hits on
// every line, including layer numbers 6 and 7 that do not exist. One cycle later each
// engine's enable for each line must equal the table bit at
// layer*32 + (x >> 5), and the hits and end-of-event must be forwarded unchanged.
module tb_dispatcher;
  import ar_pkg::*;

  localparam int LINES = 3;
  localparam int NE    = 24;
  localparam int DEPTH = 6 * 32;

  logic clk = 0, rst_n = 0;
  logic cfg_we;
  logic [$clog2(DEPTH)-1:0] cfg_addr;
  logic [NE-1:0] cfg_data;
  logic [LINES-1:0] in_valid;
  hit_t in_hit [LINES];
  logic in_eoe;
  logic [LINES-1:0] eng_valid [NE];
  hit_t out_hit [LINES];
  logic out_eoe;

  int checks = 0, failures = 0;
  logic [NE-1:0] table_ref [DEPTH];

  dispatcher #(.LINES(LINES), .N_ENG(NE), .BIN_SHIFT(5)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_addr = '0; cfg_data = '0;
    in_valid = '0; in_eoe = 0;
    for (int l = 0; l < LINES; l++) in_hit[l] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      table_ref[a] = NE'({$urandom, $urandom});
      cfg_we = 1; cfg_addr = 8'(a); cfg_data = table_ref[a];
      @(posedge clk); #1;
    end
    cfg_we = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [LINES-1:0] v;
      hit_t h [LINES];
      logic e;
      for (int l = 0; l < LINES; l++) begin
        v[l] = $urandom_range(0, 3) != 0;
        h[l].layer = 3'($urandom_range(0, 7));
        h[l].x     = 10'($urandom);
      end
      e = $urandom_range(0, 4) == 0;
      in_valid = v; in_hit = h; in_eoe = e;
      @(posedge clk); #1;
      checks++;
      begin
        bit bad;
        bad = 0;
        for (int l = 0; l < LINES; l++) begin
          for (int k = 0; k < NE; k++) begin
            bit expv;
            expv = v[l] && h[l].layer < 6 && table_ref[h[l].layer * 32 + (h[l].x >> 5)][k];
            if (eng_valid[k][l] !== expv) bad = 1;
          end
          if (out_hit[l] !== h[l]) bad = 1;
        end
        if (out_eoe !== e) bad = 1;
        if (bad) begin
          failures++;
          if (failures < 10) $display("mismatch at step %0d", n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
