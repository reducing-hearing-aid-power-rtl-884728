// tmm_mult -- signed truncated-matrix multiplier with constant correction and
// coefficient-shift rounding.
//
// Computes p ~= round(a * b / 2^(N+S)) * 2^S for two N-bit two's-complement operands,
// where b is a filter coefficient that was shifted left by S bits at design time; the
// barrel shifter that follows removes the 2^S. The partial-product matrix is the
// modified Baugh-Wooley form: bits a_i*b_j, with the bits that involve exactly one sign
// bit (a_{N-1}*b_j, a_i*b_{N-1}) inverted and a one added in columns N and 2N-1. The R
// least significant columns of that matrix are never formed: no AND gate exists for
// them. In their place a correction constant is added,
//   C = round(2^-R (2^(R+K-1) - 2^(R-1) + E_R)) 2^R,  K = N - R,
// with E_R the expected value of the missing bits (each bit is 1 with probability 1/4).
// The term 2^(R+K-1) = 2^(N-1) in C is the rounding one for an unshifted product. For a
// shifted coefficient that rounding one belongs S columns higher, in column N+S-1, so
// the design adds C - 2^(N-1) as a constant and a single rounding one in column N-1+S,
// selected by S. For S = 0 this is exactly C. The kept columns are summed and columns
// N..2N-1 form the output; dropping columns R..N-1 here and S more in the shifter
// truncates at column N+S, where the rounding one was aimed.
//
// Matrix form, correction constant, unformed columns and a rounding bit placed by S
// follow the published scheme. Taking the rounding term out of C when S > 0 (so that
// it is not counted twice), the 0 <= R <= N-1 range and summing the rows with
// word-level adders (synthesis chooses the reduction tree) are choices of this
// implementation.
//
// Purely combinational: p is valid in the same cycle as a, b and s.
module tmm_mult #(
  parameter int N  = 16,  // operand and product width
  parameter int R  = 15,  // number of unformed least significant columns
  parameter int SW = 4    // width of the coefficient shift amount
) (
  input  logic signed [N-1:0]  a,  // data operand (audio sample)
  input  logic signed [N-1:0]  b,  // coefficient operand, already shifted left by s
  input  logic        [SW-1:0] s,  // coefficient shift amount
  output logic signed [N-1:0]  p   // product, LSB at matrix column N
);

  localparam int W = 2 * N;
  localparam int K = N - R;
  localparam logic [W-1:0] CORR    = W'(ha_pkg::corr_const(R, K));
  // C without its rounding one; the rounding one is placed by s below.
  localparam logic [W-1:0] CORR0   = CORR - (W'(1) << (N - 1));
  localparam logic [W-1:0] BW_ONES = (W'(1) << N) | (W'(1) << (W - 1));

  // The partial-product rows; bit i+j of row j is a_i*b_j (inverted for the sign terms)
  // and only exists when i+j >= R.
  logic [W-1:0] row [N];
  logic [W-1:0] rnd;
  logic [W-1:0] sum;

  always_comb begin
    for (int j = 0; j < N; j++) begin
      row[j] = '0;
      for (int i = 0; i < N; i++) begin
        if (i + j >= R)
          row[j][i+j] = (a[i] & b[j]) ^ ((i == N - 1) ^ (j == N - 1));
      end
    end
  end

  // Rounding one for the result after the later right shift by s: column N-1+s.
  always_comb begin
    rnd = '0;
    rnd[N-1+int'(s)] = 1'b1;
  end

  always_comb begin
    sum = CORR0 + BW_ONES + rnd;
    for (int j = 0; j < N; j++) sum = sum + row[j];
  end

  assign p = sum[W-1:N];

  initial begin
    assert (R >= 0 && R <= N - 1)
      else $error("tmm_mult: R must lie in 0..N-1");
    assert ((1 << SW) - 1 <= N)
      else $error("tmm_mult: shift range exceeds the product width");
  end

endmodule
