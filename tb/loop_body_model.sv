// loop_body_model: behavioural stand-in for the synthesized loop computation
// (the internal circuit). Each iteration takes NRD operands, starting with
// the one flagged by din_first, and produces NWR results: result k of an
// iteration is the sum of its operands plus k. Result k is driven in body
// cycle n (n = 0 is the cycle of the first operand) where n is the position
// of the k-th set bit of ORIG_WR. Iterations overlap; up to SLOTS of them
// are tracked. All results must come after the last operand.
module loop_body_model #(
  parameter int          DATA_W  = 32,
  parameter int          NRD     = 6,
  parameter int          NBODY   = 11,
  parameter logic [63:0] ORIG_WR = 64'h600,
  parameter int          SLOTS   = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] din,
  input  logic              din_valid,
  input  logic              din_first,
  output logic [DATA_W-1:0] result,
  output logic              result_valid
);
  int          cyc;
  int          start_c [SLOTS];
  logic [DATA_W-1:0] sum [SLOTS];
  int          cur;

  initial begin
    cyc = 0;
    cur = -1;
    for (int s = 0; s < SLOTS; s++) begin
      start_c[s] = -1000;
      sum[s] = '0;
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && din_valid) begin
      if (din_first) begin
        cur = (cur + 1) % SLOTS;
        start_c[cur] <= cyc;
        sum[cur] <= din;
      end else begin
        sum[cur] <= sum[cur] + din;
      end
    end
  end

  always_comb begin
    result = '0;
    result_valid = 1'b0;
    for (int s = 0; s < SLOTS; s++) begin
      int n, k;
      k = 0;
      n = cyc - start_c[s];
      if (n >= 0 && n < NBODY && n < 64 && ORIG_WR[n]) begin
        k = 0;
        for (int b = 0; b < n; b++) if (ORIG_WR[b]) k++;
        result = sum[s] + DATA_W'(k);
        result_valid = 1'b1;
      end
    end
  end
endmodule
