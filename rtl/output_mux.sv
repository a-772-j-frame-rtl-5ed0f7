// output_mux: merges the feature-map FIFOs onto the single feature output.
//
// N word streams compete for one output. A source keeps the output until it
// has sent the last word of a pixel (in_last), so every pixel leaves in one
// piece; the next source is then chosen round-robin among those with data.
// The output carries the word, its source index (which feature map) and the
// last-word flag; valid/ready on all sides.
module output_mux #(
  parameter int N  = 4,
  parameter int W  = 128,
  localparam int SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid [N],
  output logic          in_ready [N],
  input  logic [W-1:0]  in_data  [N],
  input  logic          in_last  [N],
  output logic          out_valid,
  input  logic          out_ready,
  output logic [W-1:0]  out_data,
  output logic [SW-1:0] out_src,
  output logic          out_last
);
  logic [SW-1:0] cur, nxt;
  logic          locked;   // inside a pixel of source cur
  logic [SW-1:0] sel;
  logic          found;

  // Round-robin choice: first source with data after cur.
  always_comb begin
    nxt   = cur;
    found = 1'b0;
    for (int i = 1; i <= N; i++) begin
      int j;
      j = (int'(cur) + i) % N;
      if (!found && in_valid[j]) begin
        nxt   = SW'(j);
        found = 1'b1;
      end
    end
    sel = locked ? cur : nxt;
  end

  assign out_valid = in_valid[sel];
  assign out_data  = in_data[sel];
  assign out_last  = in_last[sel];
  assign out_src   = sel;

  always_comb
    for (int i = 0; i < N; i++) in_ready[i] = out_ready && (SW'(i) == sel);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur    <= SW'(N - 1);
      locked <= 1'b0;
    end else if (out_valid && out_ready) begin
      cur    <= sel;
      locked <= !out_last;
    end
  end
endmodule
