// mem_model: behavioural main memory and I/O port for simulation only.
//
// Stands in for the external memory module that the processor's bus talks
// to. Memory is LINES x 128-bit lines; an address selects its line with bits
// [log2(LINES)+3:4], higher bits are ignored (the memory is aliased).
// Addresses with both top bits set are the I/O space: a write stores the word
// on io_wdata in io_reg, a read returns IO_READ_VALUE on io_rdata.
//
// Handshake: when mem_req is seen high in the idle state the address, write
// enable and data are taken, LATENCY cycles later mem_valid is high for one
// cycle (read data on mem_rdata / io_rdata, write performed), then one idle
// cycle follows before the next request is accepted.
module mem_model #(
  parameter int          LATENCY       = 3,
  parameter int          LINES         = 1024,
  parameter logic [31:0] IO_READ_VALUE = 32'hCAFE_F00D
) (
  input  logic         clk,
  input  logic         mem_req,
  input  logic [31:0]  mem_addr,
  input  logic         mem_we,
  input  logic [127:0] mem_wdata,
  output logic [127:0] mem_rdata,
  output logic         mem_valid,
  input  logic [31:0]  io_wdata,
  output logic [31:0]  io_rdata
);

  localparam int LW = $clog2(LINES);

  logic [127:0] mem [LINES];
  logic [31:0]  io_reg;
  int           io_writes, io_reads, line_reads, line_writes;

  typedef enum logic [1:0] {IDLE, BUSY, GAP} st_e;
  st_e         st;
  int          cnt;
  logic [31:0] a;
  logic        we;
  logic [127:0] wd;
  logic [31:0] iw;

  initial begin
    st = IDLE; mem_valid = 1'b0; io_reg = '0; cnt = 0;
    io_writes = 0; io_reads = 0; line_reads = 0; line_writes = 0;
    mem_rdata = '0; io_rdata = '0;
  end

  always @(posedge clk) begin
    mem_valid <= 1'b0;
    case (st)
      IDLE: if (mem_req) begin
        a <= mem_addr; we <= mem_we; wd <= mem_wdata; iw <= io_wdata;
        cnt <= LATENCY; st <= BUSY;
      end
      BUSY: if (cnt > 1) cnt <= cnt - 1;
      else begin
        mem_valid <= 1'b1;
        st <= GAP;
        if (a[31:30] == 2'b11) begin
          if (we) begin io_reg <= iw; io_writes <= io_writes + 1; end
          else    begin io_rdata <= IO_READ_VALUE; io_reads <= io_reads + 1; end
        end else if (we) begin
          mem[a[LW+3:4]] <= wd; line_writes <= line_writes + 1;
        end else begin
          mem_rdata <= mem[a[LW+3:4]]; line_reads <= line_reads + 1;
        end
      end
      default: st <= IDLE;
    endcase
  end

endmodule
