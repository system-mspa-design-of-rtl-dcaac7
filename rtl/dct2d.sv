// dct2d: 8x8 two-dimensional DCT or IDCT on one distributed-arithmetic unit.
//
// The block is written into the input memory (raster order, 16-bit signed).
// After 'start' the eight rows go through dct_da one after the other and the
// results are written transposed into a second memory; the eight rows of
// that memory (the columns of the block) then go through dct_da again and
// land, transposed back, in the result memory, read with 'rd_addr'.
// The intermediate keeps 2 fractional bits (first pass shifts by 13-2, the
// second by 13+2). Each 1-D line takes 20 cycles (load, 16 bit cycles,
// result, write, next), so a block takes 16 x 20 = 320 cycles and the six
// blocks of a macroblock 1920 cycles.
module dct2d (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_en,
  input  logic [5:0]         wr_addr,
  input  logic signed [15:0] wr_data,
  input  logic               start,
  input  logic               idct,
  output logic               busy,
  output logic               done,
  input  logic [5:0]         rd_addr,
  output logic signed [15:0] rd_data
);
  logic signed [15:0] mem_in  [64];
  logic signed [15:0] mem_t   [64];
  logic signed [15:0] mem_out [64];

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_WAIT, S_WRITE} state_e;
  state_e state;
  logic [3:0] line;            // 0..7 first pass, 8..15 second pass
  logic       mode;
  logic signed [15:0] x [8];
  logic signed [15:0] y [8];
  logic da_load, da_busy, da_done;

  always_comb begin
    for (int i = 0; i < 8; i++)
      x[i] = line[3] ? mem_t[{line[2:0], 3'(i)}] : mem_in[{line[2:0], 3'(i)}];
    da_load = (state == S_LOAD);
  end

  dct_da u_da (
    .clk, .rst_n, .load(da_load), .idct(mode),
    .oshift(line[3] ? 5'd15 : 5'd11), .x, .busy(da_busy), .done(da_done), .y
  );

  always_ff @(posedge clk) begin
    if (wr_en) mem_in[wr_addr] <= wr_data;
    if (state == S_WRITE) begin
      for (int i = 0; i < 8; i++) begin
        if (!line[3]) mem_t[{3'(i), line[2:0]}] <= y[i];
        else          mem_out[{3'(i), line[2:0]}] <= y[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; line <= '0; mode <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:  if (start) begin state <= S_LOAD; line <= '0; mode <= idct; end
        S_LOAD:  state <= S_WAIT;
        S_WAIT:  if (da_done) state <= S_WRITE;
        S_WRITE: begin
          line <= line + 4'd1;
          if (line == 4'd15) begin state <= S_IDLE; done <= 1'b1; end
          else state <= S_LOAD;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign rd_data = mem_out[rd_addr];
  assign busy = (state != S_IDLE);

  logic unused;
  assign unused = da_busy;
endmodule
