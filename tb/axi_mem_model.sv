// axi_mem_model: behavioural AXI read slave standing for the shared system
// memory and interconnect (not synthesizable).
//
// Each accepted burst is given a latency drawn uniformly from
// [LAT_MIN, LAT_MAX] cycles (address handshake to first beat). Bursts with
// different IDs may return out of order, bursts with the same ID return in
// order, and one beat is returned per cycle. When OFF_CYCLES > 0 the model
// acts as a timing adapter: it alternates ON_CYCLES cycles in which it
// serves the bus with OFF_CYCLES cycles in which it accepts and returns
// nothing, producing peak latencies. Page-list entries are stored with
// set_word; every other address reads vdc_tb_pkg::mem_word(address).
//
// From the document: the verification used random latency and an ON/OFF
// timing adapter. This model's choice: latency range, reordering policy and
// the generated memory contents.
module axi_mem_model #(
  parameter int unsigned LAT_MIN    = 20,
  parameter int unsigned LAT_MAX    = 60,
  parameter int unsigned ON_CYCLES  = 0,
  parameter int unsigned OFF_CYCLES = 0,
  parameter int unsigned IDW        = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           arvalid,
  output logic           arready,
  input  logic [IDW-1:0] arid,
  input  logic [31:0]    araddr,
  input  logic [7:0]     arlen,
  output logic           rvalid,
  input  logic           rready,
  output logic [IDW-1:0] rid,
  output logic [63:0]    rdata,
  output logic           rlast
);
  typedef struct {
    logic [IDW-1:0] id;
    logic [31:0]    addr;
    int             len;
    longint         ready_at;
    longint         issued_at;
  } burst_t;

  logic [63:0] store [logic [31:0]];
  burst_t      q[$];
  longint      cyc;
  int          cur;        // index of the burst being returned, -1 none
  int          beat;
  int          on_cnt;
  logic        bus_on;

  // statistics
  int     n_bursts, n_ooo, max_out;
  longint lat_sum;

  function automatic void set_word(input logic [31:0] a, input logic [63:0] d);
    store[{a[31:3], 3'b000}] = d;
  endfunction

  function automatic logic [63:0] rd(input logic [31:0] a);
    logic [31:0] w;
    w = {a[31:3], 3'b000};
    if (store.exists(w)) return store[w];
    return vdc_tb_pkg::mem_word(w);
  endfunction

  assign bus_on  = (OFF_CYCLES == 0) || (on_cnt < int'(ON_CYCLES));
  assign arready = bus_on && rst_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc <= 0; cur <= -1; beat <= 0; on_cnt <= 0;
      rvalid <= 1'b0; rid <= '0; rdata <= '0; rlast <= 1'b0;
      n_bursts <= 0; n_ooo <= 0; max_out <= 0; lat_sum <= 0;
      q.delete();
    end else begin
      cyc <= cyc + 1;
      if (OFF_CYCLES != 0)
        on_cnt <= (on_cnt + 1 >= int'(ON_CYCLES + OFF_CYCLES)) ? 0 : on_cnt + 1;
      if (arvalid && arready) begin
        automatic burst_t bt;
        bt.id = arid; bt.addr = araddr; bt.len = int'(arlen) + 1;
        bt.issued_at = cyc;
        bt.ready_at  = cyc + longint'(LAT_MIN + ($urandom % (LAT_MAX - LAT_MIN + 1)));
        q.push_back(bt);
        n_bursts <= n_bursts + 1;
        if (q.size() > max_out) max_out <= q.size();
      end
      if (rvalid && !rready) begin
        // hold the beat
      end else begin
        automatic int pick = cur;
        rvalid <= 1'b0;
        rlast  <= 1'b0;
        if (pick < 0 && bus_on) begin
          for (int i = 0; i < q.size(); i++) begin
            automatic bit older_same = 0;
            for (int j = 0; j < i; j++) if (q[j].id == q[i].id) older_same = 1;
            if (!older_same && q[i].ready_at <= cyc) begin pick = i; break; end
          end
          if (pick > 0) n_ooo <= n_ooo + 1;
          if (pick >= 0) lat_sum <= lat_sum + (cyc - q[pick].issued_at);
        end
        if (pick >= 0 && bus_on) begin
          rvalid <= 1'b1;
          rid    <= q[pick].id;
          rdata  <= rd(q[pick].addr + 32'(8 * beat));
          if (beat + 1 == q[pick].len) begin
            rlast <= 1'b1;
            q.delete(pick);
            cur  <= -1;
            beat <= 0;
          end else begin
            cur  <= pick;
            beat <= beat + 1;
          end
        end else cur <= pick;
      end
    end
  end
endmodule
