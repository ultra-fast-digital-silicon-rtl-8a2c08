`timescale 1ps / 1ps
// parallel_counter: population count of N hit bits, built as in the design from
// K chained binary compressors (see pc_compressor).
//
// Compressor 1 takes the N pixel bits and yields the 2^0 bit of the count; its
// carry vector (weight 2) is the input of compressor 2, which yields the 2^1 bit,
// and so on. The last compressor's carry vector is a single bit, the count's MSB.
// For N = 64 this gives K = 6 compressors and a 7-bit count, for N = 8 the
// three-compressor example of the design's illustration.
//
// Interface: in[N-1:0] -> count[OW-1:0], OW = K + 1. Purely combinational; the
// physical settling time after the last hit is not modelled.
module parallel_counter
  import dsipm_pkg::*;
#(
  parameter  int unsigned N  = 64,
  localparam int unsigned OW = pc_num_comp(N) + 1
) (
  input  logic [N-1:0]  in,
  output logic [OW-1:0] count
);
  localparam int unsigned K  = pc_num_comp(N);

  // stage[k] carries the input of compressor k (N bits wide at most).
  logic [K:0][N-1:0] stage;

  assign stage[0] = in;

  for (genvar k = 0; k < K; k++) begin : g_comp
    localparam int unsigned W  = pc_stage_width(N, k);
    localparam int unsigned CW = comp_carries(W);
    localparam int unsigned CWP = (CW > 0) ? CW : 1;
    logic [CWP-1:0] cv;

    pc_compressor #(.M(W)) u_comp (
      .in   (stage[k][W-1:0]),
      .bin  (count[k]),
      .carry(cv)
    );
    if (W < N) begin : g_unused_in
      logic unused_hi;
      assign unused_hi = ^stage[k][N-1:W];
    end
    assign stage[k+1][CWP-1:0] = cv;
    if (CWP < N) begin : g_zero
      assign stage[k+1][N-1:CWP] = '0;
    end
  end

  // The last carry vector has one bit (zero when N = 1).
  assign count[K] = stage[K][0];

  logic unused_last;
  assign unused_last = ^stage[K][N-1:1];
endmodule
