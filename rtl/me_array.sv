// me_array: integer-pel full-search block matching on a Window-MSPA array.
//
// Area-small Window-MSPA design: N_R = P+1 processing elements (one per
// horizontal displacement), N_I = ceil((K+P)/K) search-area input ports and
// a computation time of K*K*(P+1) cycles (8192 for K=16, P=31). Search row
// "slots" g = 0 .. (P+1)*K-1 each stream K+P pixels of search row
// g/K + g%K, starting at cycle K*g, on port g mod N_I (the data converter);
// the current block streams in raster order, repeating every K*K cycles.
// PE j sees the current pixel and its control j cycles after PE0. Each PE
// finishes one candidate per K*K cycles, the P+1 PEs one cycle apart, and the
// comparator keeps the first minimum.
//
// Memories are outside: 'cur_addr' reads the current block (row*K+col) and
// three ports 'sa_addr' read the search area {row, col}; both reads are
// combinational. Result: best_dx/best_dy in -(P+1)/2 .. (P-1)/2 integer
// pixels with 'done' one cycle after the last SAD, K*K*(P+1)+P+4 cycles after
// 'start'. The port count is fixed at three, the value of the design.
module me_array #(
  parameter int unsigned K    = 16,
  parameter int unsigned P    = 31,
  parameter int unsigned PW   = 8,
  parameter int unsigned SADW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic [7:0]           cur_addr,
  input  logic [PW-1:0]        cur_data,
  output logic [5:0]           sa_row [3],
  output logic [5:0]           sa_col [3],
  input  logic [PW-1:0]        sa_data [3],
  output logic                 busy,
  output logic                 done,
  output logic [SADW-1:0]      best_sad,
  output logic signed [6:0]    best_dx,
  output logic signed [6:0]    best_dy,
  output logic [SADW-1:0]      sad00      // SAD of the zero vector
);
  localparam int unsigned NPE   = P + 1;
  localparam int unsigned N     = K + P;
  localparam int unsigned NI    = (N + K - 1) / K;
  localparam int unsigned WIN   = K * K;
  localparam int unsigned TP    = WIN * NPE;        // 8192
  localparam int unsigned TEND  = TP + NPE;         // last clr reaches PE P
  localparam int unsigned NSLOT = NPE * K;
  localparam int unsigned TW    = $clog2(TEND + 2);

  initial begin
    assert (NI == 3) else $error("me_array is built for three search ports");
  end

  logic [TW-1:0] t;
  logic          run;

  // ---- data converter: three search ports --------------------------------
  logic [TW-5:0] gq;       // t / K  (K = 16 assumed by the shift below)
  logic [1:0]    gmod;     // gq mod 3
  logic [PW-1:0] sport [3];

  assign gq = t[TW-1:$clog2(K)];

  always_comb begin
    for (int p = 0; p < 3; p++) begin
      sa_row[p] = '0;
      sa_col[p] = '0;
    end
    for (int d = 0; d < 3; d++) begin
      int g, x, pt;
      g  = int'(gq) - d;
      x  = int'(t) - int'(K) * g;
      pt = (int'(gmod) + 3 - d) % 3;
      if (g >= 0 && g < int'(NSLOT) && x < int'(N)) begin
        sa_row[pt] = 6'(g / int'(K) + g % int'(K));
        sa_col[pt] = 6'(x);
      end
    end
  end

  always_comb for (int p = 0; p < 3; p++) sport[p] = sa_data[p];

  // ---- PE0 control -------------------------------------------------------
  logic       en0, clr0;
  logic [1:0] sel0;
  assign cur_addr = 8'(t % WIN);
  assign en0  = run && (t < TP);
  assign clr0 = run && ((t % WIN) == 0);
  assign sel0 = gmod;

  // ---- PE chain -----------------------------------------------------------
  logic            en_c  [NPE+1];
  logic            clr_c [NPE+1];
  logic [1:0]      sel_c [NPE+1];
  logic [PW-1:0]   c_c   [NPE+1];
  logic [SADW-1:0] sad   [NPE];
  logic [NPE-1:0]  sv;

  assign en_c[0]  = en0;
  assign clr_c[0] = clr0;
  assign sel_c[0] = sel0;
  assign c_c[0]   = cur_data;

  for (genvar j = 0; j < NPE; j++) begin : g_pe
    me_pe #(.PW(PW), .SADW(SADW)) u_pe (
      .clk, .rst_n,
      .en_in(en_c[j]), .clr_in(clr_c[j]), .sel_in(sel_c[j]), .c_in(c_c[j]),
      .s1(sport[0]), .s2(sport[1]), .s3(sport[2]),
      .en_out(en_c[j+1]), .clr_out(clr_c[j+1]), .sel_out(sel_c[j+1]),
      .c_out(c_c[j+1]), .sad(sad[j]), .sad_valid(sv[j])
    );
  end

  // ---- comparator ----------------------------------------------------------
  logic [SADW-1:0] sad_bus;
  logic [$clog2(NPE)-1:0] pe_idx;
  logic [5:0]      vcnt [NPE];   // vertical displacement index per PE
  always_comb begin
    sad_bus = '0;
    pe_idx  = '0;
    for (int j = 0; j < NPE; j++)
      if (sv[j]) begin
        sad_bus = sad_bus | sad[j];
        pe_idx  = pe_idx | $clog2(NPE)'(j);
      end
  end

  logic have_best;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t <= '0; run <= 1'b0; gmod <= '0; done <= 1'b0;
      best_sad <= '0; best_dx <= '0; best_dy <= '0; have_best <= 1'b0;
      sad00 <= '0;
      for (int j = 0; j < NPE; j++) vcnt[j] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !run) begin
        run <= 1'b1; t <= '0; gmod <= '0; have_best <= 1'b0;
        for (int j = 0; j < NPE; j++) vcnt[j] <= '0;
      end else if (run) begin
        t <= t + 1'b1;
        if ((t % K) == K - 1) gmod <= (gmod == 2'd2) ? 2'd0 : gmod + 2'd1;
        if (t == TEND) begin
          run  <= 1'b0;
          done <= 1'b1;
        end
      end
      if (|sv) begin
        vcnt[pe_idx] <= vcnt[pe_idx] + 6'd1;
        if (!have_best || sad_bus < best_sad) begin
          best_sad  <= sad_bus;
          best_dx   <= 7'(signed'({1'b0, pe_idx})) - 7'(NPE / 2);
          best_dy   <= 7'(signed'({1'b0, vcnt[pe_idx]})) - 7'(NPE / 2);
          have_best <= 1'b1;
        end
        if (int'(pe_idx) == int'(NPE / 2) && int'(vcnt[pe_idx]) == int'(NPE / 2))
          sad00 <= sad_bus;
      end
    end
  end

  assign busy = run;
endmodule
