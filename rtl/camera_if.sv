// camera_if: camera interface, line-level capture into the frame memory.
//
// The camera delivers 4:2:0 QCIF video as lines: 'line_start' precedes a
// line; every line carries WIDTH luminance samples and, on even lines, also
// WIDTH/2 Cb and WIDTH/2 Cr samples of the matching chrominance line;
// 'frame_start' resets the line counter. Pixel pairs are packed into words
// and collected in one of two line buffers. When a line is complete the
// interface raises 'bus_req'; once the AGU grants the bus between two module
// accesses it writes the line's words into the hierarchical frame layout at
// 'frame_base' (see agu.sv), one word per cycle, while the other buffer keeps
// capturing. 'overrun' flags a line that was complete while both buffers were
// still full.
module camera_if
  import h263_pkg::*;
#(
  parameter int unsigned WIDTH  = 176,
  parameter int unsigned HEIGHT = 144
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  frame_start,
  input  logic  line_start,
  input  logic  pix_valid,
  input  pix_t  pix,
  input  addr_t frame_base,
  output logic  bus_req,
  input  logic  bus_gnt,
  output logic  mem_en,
  output logic  mem_we,
  output addr_t mem_addr,
  output word_t mem_wdata,
  output logic  overrun,
  output logic  frame_done
);
  localparam int unsigned NW  = WIDTH / 2;        // luminance words per line
  localparam int unsigned NWL = NW + NW / 2 * 2;  // with Cb and Cr words
  localparam int unsigned IW  = $clog2(NWL + 1);

  word_t       buf_m [2][NWL];
  logic [1:0]  full;
  logic [8:0]  fill_line [2];
  logic        wsel;               // buffer being filled
  logic [IW:0] pcnt;               // pixel count within the line
  logic [8:0]  line;
  logic [7:0]  hold;
  logic        rsel;               // buffer being written out
  logic [IW-1:0] wcnt;
  logic        writing;

  // pixel index -> word index
  logic [IW-1:0] widx;
  assign widx = IW'(pcnt >> 1);

  always_ff @(posedge clk) begin
    if (pix_valid && pcnt[0]) buf_m[wsel][widx] <= {hold, pix};
  end

  // address of the word being written
  logic [IW-1:0] wi;
  logic [9:0]    x, y;
  logic [1:0]    plane;
  always_comb begin
    logic [7:0] mb;
    wi = wcnt;
    if (wi < IW'(NW)) begin
      plane = 2'd0; x = 10'(wi) * 10'd2; y = 10'(fill_line[rsel]);
    end else if (wi < IW'(NW + NW / 2)) begin
      plane = 2'd1; x = 10'(wi - IW'(NW)) * 10'd2; y = 10'(fill_line[rsel] >> 1);
    end else begin
      plane = 2'd2; x = 10'(wi - IW'(NW + NW / 2)) * 10'd2; y = 10'(fill_line[rsel] >> 1);
    end
    if (plane == 2'd0) begin
      mb = 8'(y[7:4] * 8'd12 + 8'(x[7:4]));
      mem_addr = frame_base + 18'(mb) * 18'd192 + 18'({y[3], x[3]}) * 18'd32
               + 18'(y[2:0]) * 18'd4 + 18'(x[2:1]);
    end else begin
      mb = 8'(y[6:3] * 8'd12 + 8'(x[6:3]));
      mem_addr = frame_base + 18'(mb) * 18'd192 + (18'd3 + 18'(plane)) * 18'd32
               + 18'(y[2:0]) * 18'd4 + 18'(x[2:1]);
    end
    mem_en    = writing && bus_gnt;
    mem_we    = mem_en;
    mem_wdata = buf_m[rsel][wcnt];
  end

  // words in the line being written: chroma only on even lines
  logic [IW-1:0] nwords;
  assign nwords = fill_line[rsel][0] ? IW'(NW) : IW'(NWL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0; wsel <= 1'b0; pcnt <= '0; line <= '0; hold <= '0;
      rsel <= 1'b0; wcnt <= '0; writing <= 1'b0; overrun <= 1'b0;
      frame_done <= 1'b0; fill_line[0] <= '0; fill_line[1] <= '0;
    end else begin
      frame_done <= 1'b0;
      if (frame_start) line <= '0;
      if (line_start) pcnt <= '0;
      else if (pix_valid) begin
        if (!pcnt[0]) hold <= pix;
        pcnt <= pcnt + 1'b1;
        if (int'(pcnt) == (line[0] ? int'(WIDTH) : int'(2 * WIDTH)) - 1) begin
          // line complete
          if (full[wsel]) overrun <= 1'b1;
          full[wsel] <= 1'b1;
          fill_line[wsel] <= line;
          wsel <= ~wsel;
          line <= line + 9'd1;
        end
      end
      // write-out
      if (!writing && full[rsel]) begin
        writing <= 1'b1; wcnt <= '0;
      end else if (writing && bus_gnt) begin
        wcnt <= wcnt + 1'b1;
        if (wcnt == nwords - 1'b1) begin
          writing <= 1'b0;
          full[rsel] <= 1'b0;
          rsel <= ~rsel;
          if (int'(fill_line[rsel]) == int'(HEIGHT) - 1) frame_done <= 1'b1;
        end
      end
    end
  end

  assign bus_req = writing;
endmodule
