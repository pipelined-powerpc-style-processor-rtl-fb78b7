// cache: 256-byte, 2-way set-associative, write-back cache with 16-byte lines.
//
// Organisation (document's numbers): SETS = 8 sets x 2 ways x 4 words. An
// address splits into tag (bits above the index), index (3 bits) and a 4-bit
// byte offset. Each line has a tag, a valid bit and a dirty bit; each set has
// one LRU bit naming the way to replace next.
//
// Lookup is combinational: when valid_in is high and the addressed line is
// present, hit is high in the same cycle and rdata holds the word (or the
// zero-extended byte when byte_sz is set; big-endian byte order). A write hit
// updates the word or byte on the rising edge and marks the line dirty. Every
// hit makes the other way the LRU way.
//
// Miss handling (bus side): bus_req asks for the memory bus. Once granted,
// if the LRU victim is dirty it is first written back as a 16-byte line
// (mem_we = 1, address from the victim's tag) and becomes clean when mem_valid
// arrives; then the missing line is read (mem_we = 0) and written into the
// victim way when mem_valid arrives. The access then hits on the next cycle.
// A write miss fetches the line first (write-allocate).
//
// Uncached I/O path: when cache_active is low the access goes straight to the
// bus: mem_addr is the access address, mem_we the write strobe, io_wdata the
// store word; hit is raised in the cycle mem_valid arrives, with rdata taken
// from io_rdata.
//
// Flush: while flush is high the controller visits every line in order of
// set then way, writing dirty lines back; afterwards halt goes high and stays
// high. The document uses this to write memory back when the processor halts.
//
// The document's controller takes its outputs from a ROM whose contents are
// not reproduced, and times its RAM writes with clock-phase delay chains.
// This version is a synchronous controller with the same behaviour. All state
// is reset synchronously (valid, dirty and LRU bits cleared).
module cache #(
  parameter int SETS = 8
) (
  input  logic         clk,
  input  logic         rst,
  // processor side
  input  logic         valid_in,      // an access is requested
  input  logic [31:0]  addr,
  input  logic         wr,
  input  logic         byte_sz,
  input  logic [31:0]  wdata,
  input  logic         cache_active,  // 0: uncached I/O access
  input  logic         flush,
  output logic         hit,
  output logic [31:0]  rdata,
  output logic         halt,
  // bus side
  output logic         bus_req,
  input  logic         grant,
  input  logic         mem_valid,
  output logic [31:0]  mem_addr,
  output logic         mem_we,
  output logic [127:0] mem_wdata,
  input  logic [127:0] mem_rdata,
  output logic [31:0]  io_wdata,
  input  logic [31:0]  io_rdata
);

  localparam int IW = $clog2(SETS);
  localparam int TW = 32 - 4 - IW;

  logic [127:0]  data  [2][SETS];
  logic [TW-1:0] tag   [2][SETS];
  logic          valid [2][SETS];
  logic          dirty [2][SETS];
  logic          lru   [SETS];

  logic [TW-1:0] a_tag;
  logic [IW-1:0] a_idx;
  logic [1:0]    a_word;
  logic [1:0]    a_byte;
  logic          hit0, hit1, line_hit, hit_way;
  logic          victim;
  logic [127:0]  line;
  logic [31:0]   word;

  // flush walk
  logic [IW+1:0] fl_cnt;              // {done, set, way}
  logic          fl_done;
  logic [IW-1:0] fl_idx;
  logic          fl_way;
  logic          fl_dirty;

  assign a_tag  = addr[31 -: TW];
  assign a_idx  = addr[4 +: IW];
  assign a_word = addr[3:2];
  assign a_byte = addr[1:0];

  assign hit0     = valid[0][a_idx] && (tag[0][a_idx] == a_tag);
  assign hit1     = valid[1][a_idx] && (tag[1][a_idx] == a_tag);
  assign line_hit = cache_active && (hit0 || hit1);
  assign hit_way  = hit1;
  assign victim   = lru[a_idx];

  assign line = data[hit_way][a_idx];
  assign word = line[127 - 32*a_word -: 32];

  always_comb begin
    if (!cache_active)
      rdata = byte_sz ? {24'd0, io_rdata[31 - 8*a_byte -: 8]} : io_rdata;
    else
      rdata = byte_sz ? {24'd0, word[31 - 8*a_byte -: 8]} : word;
  end

  assign hit = valid_in && !flush &&
               (cache_active ? line_hit : (grant && mem_valid));

  assign fl_idx   = fl_cnt[IW:1];
  assign fl_way   = fl_cnt[0];
  assign fl_done  = fl_cnt[IW+1];
  assign fl_dirty = valid[fl_way][fl_idx] && dirty[fl_way][fl_idx];
  assign halt     = flush && fl_done;

  // Bus requests and the bus-side address/data
  logic miss_wb;                       // the miss must first write back the victim
  assign miss_wb = valid[victim][a_idx] && dirty[victim][a_idx];

  always_comb begin
    bus_req   = 1'b0;
    mem_addr  = {a_tag, a_idx, 4'h0};
    mem_we    = 1'b0;
    mem_wdata = data[victim][a_idx];
    io_wdata  = wdata;
    if (flush) begin
      bus_req   = !fl_done && fl_dirty;
      mem_addr  = {tag[fl_way][fl_idx], fl_idx, 4'h0};
      mem_we    = 1'b1;
      mem_wdata = data[fl_way][fl_idx];
    end else if (valid_in && !cache_active) begin
      bus_req  = 1'b1;
      mem_addr = addr;
      mem_we   = wr;
    end else if (valid_in && !line_hit) begin
      bus_req = 1'b1;
      if (miss_wb) begin
        mem_addr = {tag[victim][a_idx], a_idx, 4'h0};
        mem_we   = 1'b1;
      end
    end
  end

  // word / byte merge for a write hit
  function automatic logic [127:0] merge(input logic [127:0] l);
    logic [127:0] r;
    r = l;
    if (byte_sz) r[127 - 32*a_word - 8*a_byte -: 8] = wdata[7:0];
    else         r[127 - 32*a_word -: 32]           = wdata;
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < SETS; s++) begin
        valid[0][s] <= 1'b0;
        valid[1][s] <= 1'b0;
        dirty[0][s] <= 1'b0;
        dirty[1][s] <= 1'b0;
        lru[s]      <= 1'b0;
      end
      fl_cnt <= '0;
    end else if (flush) begin
      if (!fl_done) begin
        if (!fl_dirty) fl_cnt <= fl_cnt + 1'b1;
        else if (grant && mem_valid) begin
          dirty[fl_way][fl_idx] <= 1'b0;
          fl_cnt <= fl_cnt + 1'b1;
        end
      end
    end else if (valid_in && cache_active) begin
      if (line_hit) begin
        lru[a_idx] <= !hit_way;
        if (wr) begin
          data[hit_way][a_idx]  <= merge(line);
          dirty[hit_way][a_idx] <= 1'b1;
        end
      end else if (grant && mem_valid) begin
        if (miss_wb)
          dirty[victim][a_idx] <= 1'b0;
        else begin
          data[victim][a_idx]  <= mem_rdata;
          tag[victim][a_idx]   <= a_tag;
          valid[victim][a_idx] <= 1'b1;
          dirty[victim][a_idx] <= 1'b0;
        end
      end
    end
  end

endmodule
