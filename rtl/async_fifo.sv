// async_fifo: dual-clock FIFO of the clock-domain-crossing library, used to
// move post-mortem data from the BC clock to the memory-controller clock.
// Binary read and write pointers one bit wider than the address are kept in
// their own domains; their gray-coded copies cross through sync_2ff. full and
// wr_count are seen from the write side, empty from the read side, each from
// a synchronised (so possibly stale, never optimistic) copy of the other
// pointer. The head word is shown on rdata while empty is low (first-word
// fall-through); rd_en takes it. Writing while full or reading while empty is
// ignored and sets the sticky overflow / underflow flag (until reset).
// Only "FIFOs" is named by the design; this structure is a standard choice.
module async_fifo #(
  parameter int unsigned DW = 256,
  parameter int unsigned AW = 6
) (
  input  logic          wclk,
  input  logic          wrst,
  input  logic          wr_en,
  input  logic [DW-1:0] wdata,
  output logic          full,
  output logic [AW:0]   wr_count,
  output logic          overflow,
  input  logic          rclk,
  input  logic          rrst,
  input  logic          rd_en,
  output logic [DW-1:0] rdata,
  output logic          empty,
  output logic          underflow
);
  logic [DW-1:0] mem [2**AW];
  logic [AW:0] wbin, rbin, wgray, rgray, wgray_s, rgray_s, rbin_s;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    for (int i = AW; i >= 0; i--)
      b[i] = (i == AW) ? g[i] : (b[i+1] ^ g[i]);
    return b;
  endfunction

  // write side
  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin <= '0; wgray <= '0; overflow <= 1'b0;
    end else if (wr_en) begin
      if (full) overflow <= 1'b1;
      else begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end
  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;
  end
  sync_2ff #(.W(AW+1)) u_r2w (.clk(wclk), .rst(wrst), .d(rgray), .q(rgray_s));
  assign rbin_s   = gray2bin(rgray_s);
  assign wr_count = wbin - rbin_s;
  assign full     = (wr_count[AW] == 1'b1);

  // read side
  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin <= '0; rgray <= '0; underflow <= 1'b0;
    end else if (rd_en) begin
      if (empty) underflow <= 1'b1;
      else begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end
  sync_2ff #(.W(AW+1)) u_w2r (.clk(rclk), .rst(rrst), .d(wgray), .q(wgray_s));
  assign empty = (wgray_s == rgray);
  assign rdata = mem[rbin[AW-1:0]];
endmodule
