// integer_enc: integer part of the logarithm from the one-hot enables.
//
// Bit I_b is high when the leading one sits at a position p whose bit b is 1.
// The enables are split into the N/2 that map I_b to 1 (the "high" set) and
// the N/2 that map it to 0 (the "low" set). The high set is cut into groups
// of four; each group gives four AND terms, each term true when exactly one of
// the group's four enables is high. All these terms are ORed, and the result
// is ANDed with the NOR of the low set. This sum-of-products form and the
// grouping in fours follow the converter's integer equations; the ordering of
// enables inside a group (descending position) is this design's choice.
//
// Interface: en[N-1:0] in (one-hot), int_part[$clog2(N)-1:0] out.
// N must be a power of two and at least 8. Purely combinational.
module integer_enc #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]         en,
  output logic [$clog2(N)-1:0] int_part
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned IW   = $clog2(N);
  localparam int unsigned HALF = N / 2;

  initial begin
    assert (N >= 8 && (1 << IW) == N)
      else $error("integer_enc: N must be a power of two of at least 8");
  end

  for (genvar b = 0; b < IW; b++) begin : g_bit
    logic [HALF-1:0] hi_set;  // enables mapping I_b to 1, highest position first
    logic [HALF-1:0] lo_set;  // enables mapping I_b to 0

    always_comb begin
      int h, l;
      h = 0;
      l = 0;
      hi_set = '0;
      lo_set = '0;
      for (int p = N - 1; p >= 0; p--) begin
        if (((p >> b) & 1) == 1) begin
          hi_set[HALF-1-h] = en[p];
          h++;
        end else begin
          lo_set[HALF-1-l] = en[p];
          l++;
        end
      end
    end

    // Exactly-one-of-four detection per group, ORed over all groups.
    logic one_hot_any;
    always_comb begin
      logic [3:0] g;
      one_hot_any = 1'b0;
      for (int k = 0; k < HALF / 4; k++) begin
        g = hi_set[4*k +: 4];
        one_hot_any |= ( g[3] & ~g[2] & ~g[1] & ~g[0])
                     | (~g[3] &  g[2] & ~g[1] & ~g[0])
                     | (~g[3] & ~g[2] &  g[1] & ~g[0])
                     | (~g[3] & ~g[2] & ~g[1] &  g[0]);
      end
    end

    assign int_part[b] = one_hot_any & ~(|lo_set);
  end
endmodule
