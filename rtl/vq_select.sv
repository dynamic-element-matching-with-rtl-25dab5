// vq_select: vector quantizer of the encoder; marks the N highest-priority
// of M elements.
//
// Each element has a usage-filter value (key_i, larger = used less, so more
// deserving of selection) and an indicator bit (ind_i) that sits above the
// key as its most significant part: every element with ind = 1 outranks
// every element with ind = 0. This replaces adding or subtracting a large
// gain G times d_i[n-1] to the key. The encoder uses two instances: Vq1
// with ind = ~d_i[n-1] (turn on elements that were off) and Vq2 with
// ind = d_i[n-1] (keep on elements that were on).
//
// Sorting is done by ranking: element i is selected when fewer than N
// elements beat it. Element j beats i when its {ind, key} is larger, or is
// equal and j < i (ties go to the lower index, this design's choice). This
// needs M*(M-1) comparators and gives exactly min(N, M) selections in one
// combinational pass.
module vq_select #(
  parameter int unsigned  M  = 32,
  parameter int unsigned  VW = 16,                 // key width (signed)
  localparam int unsigned CW = $clog2(M + 1)
) (
  input  logic signed [VW-1:0] key_i [M],
  input  logic [M-1:0]         ind_i,
  input  logic [CW-1:0]        n_i,
  output logic [M-1:0]         sel_o
);

  logic [CW-1:0] rank [M];

  always_comb begin
    for (int i = 0; i < M; i++) begin
      rank[i] = '0;
      for (int j = 0; j < M; j++) begin
        if (j != i) begin
          if ((ind_i[j] && !ind_i[i]) ||
              ((ind_i[j] == ind_i[i]) &&
               ((key_i[j] > key_i[i]) || ((key_i[j] == key_i[i]) && (j < i)))))
            rank[i] = rank[i] + 1'b1;
        end
      end
      sel_o[i] = (rank[i] < n_i);
    end
  end

endmodule
