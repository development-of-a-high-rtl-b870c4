// tb_local_max: self-checking test of the local-maximum finder.
//
// Random weight maps on a 5 x 7 grid (values drawn from a small range so that equal
// neighbours are frequent) and random thresholds. The reference marks a cell when its
// weight is above threshold, strictly above every lower-index neighbour and not below
// any higher-index neighbour of the 8-neighbourhood. Results must come one cycle later.
module tb_local_max;
  import ar_pkg::*;

  localparam int NU = 5, NV = 7, NE = NU * NV;

  logic clk = 0, rst_n = 0;
  logic [ACC_W-1:0] threshold;
  logic in_valid;
  logic [ACC_W-1:0] in_w [NE];
  logic out_valid;
  logic [NE-1:0] is_max;
  logic [ACC_W-1:0] out_w [NE];

  int checks = 0, failures = 0, nmax = 0;

  local_max #(.NU(NU), .NV(NV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ref_max(int w[NE], int thr, int u, int v);
    int me = w[u*NV+v];
    if (me <= thr) return 0;
    for (int a = u - 1; a <= u + 1; a++)
      for (int b = v - 1; b <= v + 1; b++) begin
        if (a < 0 || a >= NU || b < 0 || b >= NV || (a == u && b == v)) continue;
        if (a * NV + b < u * NV + v) begin
          if (!(me > w[a*NV+b])) return 0;
        end else begin
          if (me < w[a*NV+b]) return 0;
        end
      end
    return 1;
  endfunction

  initial begin
    in_valid = 0; threshold = '0;
    for (int e = 0; e < NE; e++) in_w[e] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      int w [NE];
      int thr;
      int range;
      range = (n % 2) ? 4 : 60000;
      thr = $urandom_range(0, range / 2);
      for (int e = 0; e < NE; e++) begin
        w[e] = $urandom_range(0, range);
        in_w[e] = ACC_W'(w[e]);
      end
      threshold = ACC_W'(thr);
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      checks++;
      begin
        bit bad;
        bad = !out_valid;
        for (int u = 0; u < NU; u++)
          for (int v = 0; v < NV; v++) begin
            if (is_max[u*NV+v] !== ref_max(w, thr, u, v)) bad = 1;
            if (out_w[u*NV+v] !== ACC_W'(w[u*NV+v])) bad = 1;
            nmax += int'(is_max[u*NV+v]);
          end
        if (bad) begin
          failures++;
          if (failures < 10) $display("mismatch in map %0d", n);
        end
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid) begin
        failures++;
        $display("out_valid held too long");
      end
    end
    checks++;
    if (nmax == 0) begin
      failures++;
      $display("no maxima seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
