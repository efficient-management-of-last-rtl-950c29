// dram_model: behavioural DRAM behind the LLC, for simulation only.
//
// Accepts one request at a time on a valid/ready port. A write is stored at
// once; a read is answered by a single mem_rsp_valid pulse LATENCY cycles
// after it was taken. Blocks never written read as pattern(addr), the same
// formula the testbenches use for their reference memory. It also counts the
// reads and writes it served.
module dram_model #(
  parameter int unsigned BA_W    = 30,
  parameter int unsigned BLK_W   = 512,
  parameter int unsigned LATENCY = 20
) (
  input  logic             clk,
  input  logic             mem_req_valid,
  output logic             mem_req_ready,
  input  logic             mem_req_write,
  input  logic [BA_W-1:0]  mem_req_addr,
  input  logic [BLK_W-1:0] mem_req_wdata,
  output logic             mem_rsp_valid,
  output logic [BLK_W-1:0] mem_rsp_rdata
);

  logic [BLK_W-1:0] mem [logic [BA_W-1:0]];
  int unsigned      busy = 0;
  logic [BA_W-1:0]  rd_addr;
  int unsigned      reads = 0;
  int unsigned      writes = 0;

  function automatic logic [BLK_W-1:0] pattern(logic [BA_W-1:0] a);
    logic [BLK_W-1:0] d;
    for (int i = 0; i < BLK_W / 32; i++)
      d[i*32 +: 32] = 32'(a) * 32'h9E37_79B1 + 32'(i);
    return d;
  endfunction

  assign mem_req_ready = (busy == 0);

  initial begin
    mem_rsp_valid = 1'b0;
    mem_rsp_rdata = '0;
  end

  always @(posedge clk) begin
    mem_rsp_valid <= 1'b0;
    if (busy > 1) begin
      busy <= busy - 1;
    end else if (busy == 1) begin
      busy          <= 0;
      mem_rsp_valid <= 1'b1;
      mem_rsp_rdata <= mem.exists(rd_addr) ? mem[rd_addr] : pattern(rd_addr);
    end else if (mem_req_valid) begin
      if (mem_req_write) begin
        mem[mem_req_addr] = mem_req_wdata;
        writes++;
      end else begin
        rd_addr <= mem_req_addr;
        busy    <= LATENCY;
        reads++;
      end
    end
  end

endmodule
