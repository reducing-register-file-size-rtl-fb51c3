// tb_dmem_model: behavioural model of the data-cache side seen by the core
// (L1 data cache backed by L2 and main memory), for simulation only. Reads
// only: the data of a 32-bit word is a fixed function of its address,
// data = addr * 7 + 3. Lines of 32 bytes are tracked in a direct-mapped tag
// store of 4096 lines: a request to a line that is present answers after
// HIT_LAT cycles, a request to a line whose fill is under way answers when
// the fill arrives, any other request starts a fill answering after
// MISS_LAT cycles. Every request is accepted (non-blocking, PORTS ports);
// up to PORTS responses leave per cycle, registered.
module tb_dmem_model #(
  parameter int unsigned PORTS    = 4,
  parameter int unsigned RW       = 7,
  parameter int unsigned QW       = 6,
  parameter int unsigned HIT_LAT  = 2,
  parameter int unsigned MISS_LAT = 300
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mreq_valid [PORTS],
  input  logic        mreq_main  [PORTS],
  input  logic [31:0] mreq_addr  [PORTS],
  input  logic [RW-1:0] mreq_rob [PORTS],
  input  logic [QW-1:0] mreq_lsq [PORTS],
  output logic        mrsp_valid [PORTS],
  output logic        mrsp_main  [PORTS],
  output logic [RW-1:0] mrsp_rob [PORTS],
  output logic [QW-1:0] mrsp_lsq [PORTS],
  output logic [31:0] mrsp_data  [PORTS],
  output int unsigned misses,
  output int unsigned max_outstanding_misses
);
  localparam int NQ = 1024;
  typedef struct {
    bit          valid;
    longint      t;
    bit          main;
    logic [RW-1:0] rob;
    logic [QW-1:0] lsq;
    logic [31:0] data;
  } rsp_t;

  rsp_t   q [NQ];
  bit     lv [4096];
  logic [14:0] ltag [4096];
  longint lt [4096];
  longint now;

  function automatic logic [31:0] mem_word(logic [31:0] a);
    return a * 32'd7 + 32'd3;
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      now <= 0;
      misses <= 0;
      max_outstanding_misses <= 0;
      for (int i = 0; i < NQ; i++) q[i].valid = 1'b0;
      for (int i = 0; i < 4096; i++) lv[i] = 1'b0;
      for (int p = 0; p < PORTS; p++) mrsp_valid[p] <= 1'b0;
    end else begin
      int n, om;
      now <= now + 1;
      // responses due
      n = 0;
      for (int p = 0; p < PORTS; p++) mrsp_valid[p] <= 1'b0;
      for (int i = 0; i < NQ; i++)
        if (q[i].valid && q[i].t <= now && n < PORTS) begin
          mrsp_valid[n] <= 1'b1;
          mrsp_main[n]  <= q[i].main;
          mrsp_rob[n]   <= q[i].rob;
          mrsp_lsq[n]   <= q[i].lsq;
          mrsp_data[n]  <= q[i].data;
          q[i].valid = 1'b0;
          n++;
        end
      // new requests
      for (int p = 0; p < PORTS; p++)
        if (mreq_valid[p]) begin
          logic [31:0] line;
          int   set;
          longint t;
          line = mreq_addr[p] >> 5;
          set  = int'(line[11:0]);
          if (lv[set] && ltag[set] == line[26:12]) begin
            t = (lt[set] > now) ? lt[set] : now + HIT_LAT;
          end else begin
            t = now + MISS_LAT;
            lv[set] = 1'b1;
            ltag[set] = line[26:12];
            lt[set] = t;
            misses <= misses + 1;
          end
          for (int i = 0; i < NQ; i++)
            if (!q[i].valid) begin
              q[i] = '{valid: 1'b1, t: t, main: mreq_main[p], rob: mreq_rob[p],
                       lsq: mreq_lsq[p], data: mem_word(mreq_addr[p])};
              break;
            end
        end
      om = 0;
      for (int s = 0; s < 4096; s++) if (lv[s] && lt[s] > now) om++;
      if (om > max_outstanding_misses) max_outstanding_misses <= om;
    end
  end
endmodule
