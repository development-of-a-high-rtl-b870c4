// tb_centroid: self-checking test of the sub-cell interpolation.
//
// Random records with random 3 x 3 weight patches (some all zero, some records without a
// track) are fed one per cycle. The reference offsets are
// trunc(128 * (row(+1) - row(-1)) / total) and the same for columns, 0 when the total is
// zero or there is no track; the other record fields must pass through unchanged, two
// cycles later.
module tb_centroid;
  import ar_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_track, in_eoe;
  logic [3:0] in_iu;
  logic [4:0] in_iv;
  logic [ACC_W-1:0] in_w;
  logic [15:0] in_event;
  logic [7:0] in_ntracks;
  logic [ACC_W-1:0] in_nb [9];
  logic out_valid, out_track, out_eoe;
  logic [3:0] out_iu;
  logic [4:0] out_iv;
  logic [ACC_W-1:0] out_w;
  logic [15:0] out_event;
  logic [7:0] out_ntracks;
  logic signed [7:0] out_du, out_dv;

  centroid #(.FRAC(7)) dut (.*);

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bit v; bit t; bit e; int iu; int iv; int w; int ev; int nt; int du; int dv; } rec_t;
  rec_t pipe [3];

  initial begin
    in_valid = 0; in_track = 0; in_eoe = 0; in_iu = '0; in_iv = '0; in_w = '0;
    in_event = '0; in_ntracks = '0;
    for (int k = 0; k < 9; k++) in_nb[k] = '0;
    for (int i = 0; i < 3; i++) pipe[i].v = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      rec_t r;
      int up, um, vp, vm, tot, nb[9], mode;
      mode = $urandom_range(0, 9);
      for (int k = 0; k < 9; k++) begin
        nb[k] = (mode == 0) ? 0 : (mode < 4 ? $urandom_range(0, 65535) : $urandom_range(0, 3000));
        in_nb[k] = ACC_W'(nb[k]);
      end
      up = nb[6] + nb[7] + nb[8];
      um = nb[0] + nb[1] + nb[2];
      vp = nb[2] + nb[5] + nb[8];
      vm = nb[0] + nb[3] + nb[6];
      tot = 0;
      for (int k = 0; k < 9; k++) tot += nb[k];
      r.v = $urandom_range(0, 5) != 0;
      r.t = $urandom_range(0, 4) != 0;
      r.e = $urandom_range(0, 1);
      r.iu = $urandom_range(0, 15); r.iv = $urandom_range(0, 31);
      r.w = $urandom_range(0, 65535); r.ev = $urandom_range(0, 65535); r.nt = $urandom_range(0, 200);
      if (r.t && tot != 0) begin
        longint nu, nv;
        nu = longint'(up - um) * 128;
        nv = longint'(vp - vm) * 128;
        r.du = int'(nu / tot);
        r.dv = int'(nv / tot);
      end else begin
        r.du = 0;
        r.dv = 0;
      end
      in_valid = r.v; in_track = r.t; in_eoe = r.e; in_iu = 4'(r.iu); in_iv = 5'(r.iv);
      in_w = ACC_W'(r.w); in_event = 16'(r.ev); in_ntracks = 8'(r.nt);
      pipe[2] = pipe[1];
      pipe[1] = pipe[0];
      pipe[0] = r;
      @(posedge clk); #1;
      if (n >= 1) begin
        rec_t x;
        x = pipe[1];
        checks++;
        if (out_valid != x.v || out_track != x.t || out_eoe != x.e || int'(out_iu) != x.iu ||
            int'(out_iv) != x.iv || int'(out_w) != x.w || int'(out_event) != x.ev ||
            int'(out_ntracks) != x.nt || int'(out_du) != x.du || int'(out_dv) != x.dv) begin
          failures++;
          if (failures < 10)
            $display("record %0d: du %0d dv %0d, expected %0d %0d", n - 1, out_du, out_dv, x.du, x.dv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
