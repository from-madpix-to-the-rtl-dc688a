`timescale 1ps/1ps
// or_tree: balanced OR of N inputs. The inputs are padded with zeros to the
// next power of two and reduced pairwise, level by level, so that every input
// passes through the same number of two-input OR gates (ceil(log2 N)). Used
// as the trigger of a pixel string, where equal path delays keep the time of
// arrival independent of which pixel fired. Purely combinational.
module or_tree #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0] in,
  output logic         out
);
  if (N == 1) begin : g_single
    assign out = in[0];
  end else begin : g_tree
    localparam int unsigned L = $clog2(N);
    for (genvar k = 0; k <= L; k++) begin : g_lvl
      logic [(2**(L-k))-1:0] v;
      if (k == 0) begin : g_in
        assign v = (2**L)'(in);
      end else begin : g_or
        for (genvar i = 0; i < 2**(L-k); i++) begin : g_gate
          assign v[i] = g_lvl[k-1].v[2*i] | g_lvl[k-1].v[2*i+1];
        end
      end
    end
    assign out = g_lvl[L].v[0];
  end
endmodule
