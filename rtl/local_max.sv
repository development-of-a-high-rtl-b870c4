// local_max: finds reconstructed tracks as local maxima of the cell weights.
//
// At the end of every event all engines present their accumulated weights at once. A
// cell is a track candidate when its weight is above the programmable threshold and it
// is a local maximum among its up to eight neighbours in the (u,v) grid. Equal weights
// are resolved by cell index so that a flat top yields exactly one maximum: a cell must
// be strictly larger than neighbours with a lower index and at least as large as
// neighbours with a higher index.
//
// Interface: in_valid with in_w[e] for e = iu*N_V + iv (iu along u, iv along v);
// threshold is compared with ">". Outputs is_max[e] and a copy of the weights.
// Timing: one register stage (input at t, result at t+1), one event per cycle.
// Threshold and local-maximum search follow the prototype; the 8-neighbourhood, the
// tie rule and the strict ">" are this design's choices.
module local_max
  import ar_pkg::*;
#(
  parameter int unsigned NU    = N_U,
  parameter int unsigned NV    = N_V,
  localparam int unsigned N_ENG = NU * NV
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ACC_W-1:0]  threshold,
  input  logic              in_valid,
  input  logic [ACC_W-1:0]  in_w [N_ENG],
  output logic              out_valid,
  output logic [N_ENG-1:0]  is_max,
  output logic [ACC_W-1:0]  out_w [N_ENG]
);

  logic [N_ENG-1:0] max_c;

  always_comb begin
    for (int iu = 0; iu < int'(NU); iu++) begin
      for (int iv = 0; iv < int'(NV); iv++) begin
        int  e;
        logic m;
        e = iu * int'(NV) + iv;
        m = in_w[e] > threshold;
        for (int du = -1; du <= 1; du++) begin
          for (int dv = -1; dv <= 1; dv++) begin
            int nu, nv, n;
            nu = iu + du;
            nv = iv + dv;
            n  = nu * int'(NV) + nv;
            if ((du != 0 || dv != 0) && nu >= 0 && nu < int'(NU) && nv >= 0 && nv < int'(NV)) begin
              if (n < e) m = m && (in_w[e] >  in_w[n]);
              else       m = m && (in_w[e] >= in_w[n]);
            end
          end
        end
        max_c[e] = m;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      is_max    <= '0;
      for (int e = 0; e < int'(N_ENG); e++) out_w[e] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        is_max <= max_c;
        for (int e = 0; e < int'(N_ENG); e++) out_w[e] <= in_w[e];
      end
    end
  end

endmodule
