// sdram_model -- behavioural model of the external SDRAM and its controller,
// for simulation only; it has none of the timing rules of a real part.
//
// Stores MEM_BYTES of memory as 32-bit words and moves whole 32-byte lines in
// bursts of eight words. A request is taken whenever the model is idle
// (mem_req_ready high). A write carries the first word with the request and
// the other seven with mem_wvalid. A read returns eight words on consecutive
// clocks, the first `read_latency` clocks after the request was taken; the
// default of 12 stands for eight clocks of line request plus four of SDRAM
// delay. Testbenches may change read_latency, and may read or overwrite
// `words` directly to play the attacker on the external bus.
module sdram_model
  import otp_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 512 * 1024,
  parameter int unsigned ADDR_W    = $clog2(MEM_BYTES)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mem_req_valid,
  output logic              mem_req_ready,
  input  logic              mem_req_we,
  input  logic [ADDR_W-1:0] mem_req_addr,
  input  word_t             mem_wdata,
  input  logic              mem_wvalid,
  output logic              mem_rvalid,
  output word_t             mem_rdata
);

  localparam int unsigned WORDS = MEM_BYTES / 4;

  word_t words [WORDS];
  int    read_latency = 12;
  int    reads = 0, writes = 0;

  typedef enum logic [1:0] {M_IDLE, M_WRITE, M_WAIT, M_READ} mstate_e;
  mstate_e state = M_IDLE;
  int      base = 0, beat = 0, wait_cnt = 0;

  initial for (int i = 0; i < WORDS; i++) words[i] = '0;

  assign mem_req_ready = (state == M_IDLE);
  assign mem_rvalid    = (state == M_READ);
  assign mem_rdata     = words[base + beat];

  always @(posedge clk) begin
    if (!rst_n) begin
      state <= M_IDLE;
    end else begin
      case (state)
        M_IDLE: if (mem_req_valid) begin
          base <= (int'(mem_req_addr) / 4) & ~7;
          if (mem_req_we) begin
            words[(int'(mem_req_addr) / 4) & ~7] <= mem_wdata;
            beat   <= 1;
            state  <= M_WRITE;
            writes <= writes + 1;
          end else begin
            beat     <= 0;
            wait_cnt <= read_latency - 1;
            state    <= (read_latency <= 1) ? M_READ : M_WAIT;
            reads    <= reads + 1;
          end
        end
        M_WRITE: if (mem_wvalid) begin
          words[base + beat] <= mem_wdata;
          beat <= beat + 1;
          if (beat == 7) state <= M_IDLE;
        end
        M_WAIT: begin
          wait_cnt <= wait_cnt - 1;
          if (wait_cnt <= 1) state <= M_READ;
        end
        M_READ: begin
          beat <= beat + 1;
          if (beat == 7) state <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

endmodule
