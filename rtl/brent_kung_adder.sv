// brent_kung_adder: W-bit parallel-prefix adder with the Brent-Kung network.
//
// Bit generate g = a & b and propagate p = a ^ b are combined by the
// prefix operator (G, P) o (G', P') = (G | P & G', P & P'). The up-sweep
// (log2 W levels) forms group terms at positions 2**(l+1)-1, 2*2**(l+1)-1,
// ...; the down-sweep (log2 W - 1 levels) fills in the remaining positions.
// This uses about 2W prefix cells at a depth of 2*log2(W) - 1, the
// area-lean trade-off the Brent-Kung structure is chosen for. The carry
// into bit i+1 is G[i:0] | P[i:0] & cin.
//
// Ports: a, b, cin in; sum (W bits) and cout out. W must be a power of two.
// Purely combinational.
module brent_kung_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned LEVELS = $clog2(W);

  if ((1 << LEVELS) != W) begin : g_bad
    $error("brent_kung_adder: W must be a power of two");
  end

  logic [W-1:0] p;      // bit propagate
  logic [W-1:0] gg, pp; // prefix group generate / propagate
  logic [W:0]   carry;

  always_comb begin
    p  = a ^ b;
    gg = a & b;
    pp = p;
    // up-sweep
    for (int l = 0; l < LEVELS; l++) begin
      for (int i = (2 << l) - 1; i < W; i += (2 << l)) begin
        gg[i] = gg[i] | (pp[i] & gg[i-(1<<l)]);
        pp[i] = pp[i] & pp[i-(1<<l)];
      end
    end
    // down-sweep
    for (int l = LEVELS - 2; l >= 0; l--) begin
      for (int i = (3 << l) - 1; i < W; i += (2 << l)) begin
        gg[i] = gg[i] | (pp[i] & gg[i-(1<<l)]);
        pp[i] = pp[i] & pp[i-(1<<l)];
      end
    end
    carry[0] = cin;
    for (int i = 0; i < W; i++) begin
      carry[i+1] = gg[i] | (pp[i] & cin);
    end
    sum  = p ^ carry[W-1:0];
    cout = carry[W];
  end

endmodule
