// gw_icache_model: behavioural instruction cache for the GW core testbenches.
//
// Not part of the design: the core's instruction cache is an outside part.
// Holds the program in an array loaded with load(). Each request (an aligned
// pair of words and a tag) is answered with both words after a random delay
// of 1..MAXLAT cycles, one response per cycle, possibly out of order.
// req_ready is randomly dropped to exercise back-pressure.
module gw_icache_model
  import gw_pkg::*;
#(
  parameter int unsigned BW     = 1,
  parameter int unsigned MAXLAT = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid,
  input  pc_t           req_pc,
  input  logic [BW-1:0] req_tag,
  output logic          req_ready,
  output logic          rsp_valid,
  output logic [BW-1:0] rsp_tag,
  output logic [31:0]   rsp_data [2]
);

  logic [31:0] mem [1 << PC_W];

  typedef struct { pc_t pc; logic [BW-1:0] tag; int unsigned due; } pend_t;
  pend_t q [$];
  int unsigned now;
  int unsigned nreq;

  function void load(logic [31:0] prog []);
    foreach (mem[i]) mem[i] = prog[i];
  endfunction

  always_ff @(posedge clk) req_ready <= ($urandom_range(0, 7) != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q.delete();
      now <= 0;
      nreq <= 0;
      rsp_valid <= 1'b0;
    end else begin
      now <= now + 1;
      rsp_valid <= 1'b0;
      // answer one due request, from anywhere in the queue
      for (int i = 0; i < q.size(); i++)
        if (q[i].due <= now) begin
          rsp_valid   <= 1'b1;
          rsp_tag     <= q[i].tag;
          rsp_data[0] <= mem[{q[i].pc[PC_W-1:1], 1'b0}];
          rsp_data[1] <= mem[{q[i].pc[PC_W-1:1], 1'b1}];
          q.delete(i);
          break;
        end
      if (req_valid && req_ready) begin
        q.push_back('{req_pc, req_tag, now + $urandom_range(1, MAXLAT)});
        nreq <= nreq + 1;
      end
    end
  end

endmodule
