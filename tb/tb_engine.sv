// tb_engine: self-checking test of one engine.
//
// Random events of 0..12 input cycles are driven on all lines, with random layers and
// coordinates clustered around the cell's pattern track so that both in-window and
// out-of-window hits occur; one event is long enough to saturate the accumulator. The
// reference weight is computed here from the kernel definition (w = (1024 - d*d)/4 for
// |d| < 32). Each result must appear exactly three cycles after its end-of-event.
module tb_engine;
  import ar_pkg::*;

  localparam int LINES = 6;
  localparam int UC = 224, VC = 600;

  logic clk = 0, rst_n = 0;
  logic [LINES-1:0] hit_valid;
  hit_t hit [LINES];
  logic eoe;
  logic res_valid;
  logic [ACC_W-1:0] res_weight;

  int checks = 0, failures = 0;
  int cycle = 0;

  engine #(.LINES(LINES), .U_C(UC), .V_C(VC)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_w(int l, int x);
    int xe, d;
    xe = UC + ((VC - UC) * l) / 5;
    d = x - xe;
    if (d < 0) d = -d;
    return (d < 32) ? (1024 - d * d) / 4 : 0;
  endfunction

  // expected results, with the cycle at which they must appear
  int exp_w [$];
  int exp_t [$];

  always @(posedge clk) begin
    if (rst_n && res_valid) begin
      checks++;
      if (exp_w.size() == 0) begin
        failures++;
        $display("unexpected result %0d", res_weight);
      end else begin
        int w, t;
        w = exp_w.pop_front();
        t = exp_t.pop_front();
        if (int'(res_weight) != w || cycle != t) begin
          failures++;
          $display("result %0d at cycle %0d, expected %0d at %0d", res_weight, cycle, w, t);
        end
      end
    end
  end

  task automatic run_event(int ncyc, bit centred);
    int acc = 0;
    for (int c = 0; c < ncyc; c++) begin
      for (int l = 0; l < LINES; l++) begin
        int lay, x;
        lay = $urandom_range(0, 6);   // 6 is a layer that does not exist
        if (centred) x = UC + ((VC - UC) * (lay > 5 ? 0 : lay)) / 5;
        else         x = UC + ((VC - UC) * (lay > 5 ? 0 : lay)) / 5 + $urandom_range(0, 90) - 45;
        hit_valid[l] = $urandom_range(0, 3) != 0;
        hit[l].layer = 3'(lay);
        hit[l].x     = 10'(x);
        if (hit_valid[l] && lay < 6) acc += ref_w(lay, x);
      end
      eoe = (c == ncyc - 1);
      if (eoe) begin
        exp_w.push_back(acc > 65535 ? 65535 : acc);
        exp_t.push_back(cycle + 3);
      end
      @(posedge clk);
      #1;
    end
    if (ncyc == 0) begin
      hit_valid = '0;
      eoe = 1;
      exp_w.push_back(0);
      exp_t.push_back(cycle + 3);
      @(posedge clk);
      #1;
    end
    hit_valid = '0;
    eoe = 0;
  endtask

  initial begin
    hit_valid = '0;
    eoe = 0;
    for (int l = 0; l < LINES; l++) hit[l] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);
    #1;
    for (int ev = 0; ev < 200; ev++) begin
      run_event($urandom_range(0, 12), 1'b0);
      // sometimes a gap between events
      if ($urandom_range(0, 3) == 0) begin
        @(posedge clk);
        #1;
      end
    end
    run_event(60, 1'b1);   // saturates
    run_event(3, 1'b0);
    repeat (10) @(posedge clk);
    if (exp_w.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_w.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
