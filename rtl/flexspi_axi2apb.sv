// flexspi_axi2apb - AXI4 slave to APB master bridge for the FlexSPI controller.
//
// Serves one AXI transaction at a time, writes first when a write and a read
// wait together. Each AXI beat becomes one APB transfer (setup cycle, then
// access cycles until PREADY). A write beat is taken from the W channel before
// its APB transfer; the single B response follows the last beat and reports
// SLVERR if any beat saw PSLVERR. A read beat is returned on R after its APB
// transfer, with its own response and RLAST on the last beat. INCR and WRAP
// bursts advance the address by the beat size, FIXED bursts keep it (WRAP is
// served as INCR). APB carries the low APB_AW address bits; selecting the
// controller's window is left to the AXI interconnect. WSTRB, AxLOCK, AxCACHE,
// AxPROT and AxQOS are accepted and not used: registers are written whole.
// The document only names this bridge; this is the simplest bridge that does
// the job, and all of its behaviour is this design's choice.
module flexspi_axi2apb #(
  parameter int unsigned ID_W   = 4,
  parameter int unsigned APB_AW = 12
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // AXI4 write address
  input  logic [ID_W-1:0]   s_axi_awid,
  input  logic [31:0]       s_axi_awaddr,
  input  logic [7:0]        s_axi_awlen,
  input  logic [2:0]        s_axi_awsize,
  input  logic [1:0]        s_axi_awburst,
  input  logic              s_axi_awlock,
  input  logic [3:0]        s_axi_awcache,
  input  logic [2:0]        s_axi_awprot,
  input  logic [3:0]        s_axi_awqos,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  // AXI4 write data
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wlast,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  // AXI4 write response
  output logic [ID_W-1:0]   s_axi_bid,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  // AXI4 read address
  input  logic [ID_W-1:0]   s_axi_arid,
  input  logic [31:0]       s_axi_araddr,
  input  logic [7:0]        s_axi_arlen,
  input  logic [2:0]        s_axi_arsize,
  input  logic [1:0]        s_axi_arburst,
  input  logic              s_axi_arlock,
  input  logic [3:0]        s_axi_arcache,
  input  logic [2:0]        s_axi_arprot,
  input  logic [3:0]        s_axi_arqos,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  // AXI4 read data
  output logic [ID_W-1:0]   s_axi_rid,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rlast,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  // APB master
  output logic [APB_AW-1:0] paddr_o,
  output logic [31:0]       pwdata_o,
  output logic              pwrite_o,
  output logic              psel_o,
  output logic              penable_o,
  input  logic [31:0]       prdata_i,
  input  logic              pready_i,
  input  logic              pslverr_i
);

  typedef enum logic [2:0] {
    B_IDLE, B_WDATA, B_SETUP, B_ACCESS, B_BRESP, B_RDATA
  } br_state_e;

  localparam logic [1:0] BURST_FIXED = 2'b00;
  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;

  br_state_e        state;
  logic [ID_W-1:0]  id_q;
  logic [31:0]      addr_q, wdata_q, rdata_q;
  logic [7:0]       beats_q;     // beats left after the current one
  logic [2:0]       size_q;
  logic [1:0]       burst_q;
  logic             write_q, err_q, rerr_q;
  logic             take_aw, take_ar;

  assign take_aw       = (state == B_IDLE) & s_axi_awvalid;
  assign take_ar       = (state == B_IDLE) & ~s_axi_awvalid & s_axi_arvalid;
  assign s_axi_awready = (state == B_IDLE);
  assign s_axi_arready = (state == B_IDLE) & ~s_axi_awvalid;
  assign s_axi_wready  = (state == B_WDATA);

  assign s_axi_bid    = id_q;
  assign s_axi_bresp  = err_q ? RESP_SLVERR : RESP_OKAY;
  assign s_axi_bvalid = (state == B_BRESP);

  assign s_axi_rid    = id_q;
  assign s_axi_rdata  = rdata_q;
  assign s_axi_rresp  = rerr_q ? RESP_SLVERR : RESP_OKAY;
  assign s_axi_rlast  = (beats_q == '0);
  assign s_axi_rvalid = (state == B_RDATA);

  assign paddr_o   = addr_q[APB_AW-1:0];
  assign pwdata_o  = wdata_q;
  assign pwrite_o  = write_q;
  assign psel_o    = (state == B_SETUP) | (state == B_ACCESS);
  assign penable_o = (state == B_ACCESS);

  function automatic logic [31:0] next_addr(input logic [31:0] a, input logic [2:0] sz,
                                            input logic [1:0] burst);
    return (burst == BURST_FIXED) ? a : a + (32'd1 << sz);
  endfunction

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state   <= B_IDLE;
      id_q    <= '0;
      addr_q  <= '0;
      wdata_q <= '0;
      rdata_q <= '0;
      beats_q <= '0;
      size_q  <= '0;
      burst_q <= '0;
      write_q <= 1'b0;
      err_q   <= 1'b0;
      rerr_q  <= 1'b0;
    end else begin
      unique case (state)
        B_IDLE: begin
          if (take_aw) begin
            id_q    <= s_axi_awid;
            addr_q  <= s_axi_awaddr;
            beats_q <= s_axi_awlen;
            size_q  <= s_axi_awsize;
            burst_q <= s_axi_awburst;
            write_q <= 1'b1;
            err_q   <= 1'b0;
            state   <= B_WDATA;
          end else if (take_ar) begin
            id_q    <= s_axi_arid;
            addr_q  <= s_axi_araddr;
            beats_q <= s_axi_arlen;
            size_q  <= s_axi_arsize;
            burst_q <= s_axi_arburst;
            write_q <= 1'b0;
            state   <= B_SETUP;
          end
        end
        B_WDATA: begin
          if (s_axi_wvalid) begin
            wdata_q <= s_axi_wdata;
            state   <= B_SETUP;
          end
        end
        B_SETUP: state <= B_ACCESS;
        B_ACCESS: begin
          if (pready_i) begin
            if (write_q) begin
              err_q <= err_q | pslverr_i;
              if (beats_q == '0) begin
                state <= B_BRESP;
              end else begin
                beats_q <= beats_q - 1'b1;
                addr_q  <= next_addr(addr_q, size_q, burst_q);
                state   <= B_WDATA;
              end
            end else begin
              rdata_q <= prdata_i;
              rerr_q  <= pslverr_i;
              state   <= B_RDATA;
            end
          end
        end
        B_BRESP: if (s_axi_bready) state <= B_IDLE;
        B_RDATA: begin
          if (s_axi_rready) begin
            if (beats_q == '0) begin
              state <= B_IDLE;
            end else begin
              beats_q <= beats_q - 1'b1;
              addr_q  <= next_addr(addr_q, size_q, burst_q);
              state   <= B_SETUP;
            end
          end
        end
        default: state <= B_IDLE;
      endcase
    end
  end

  // AXI: a response stays valid until taken; APB: address stable in access
  assert property (@(posedge clk_i) disable iff (!rst_ni) s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  assert property (@(posedge clk_i) disable iff (!rst_ni) s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));
  assert property (@(posedge clk_i) disable iff (!rst_ni) penable_o |-> psel_o && $stable(paddr_o));
  // the last write beat carries WLAST
  assert property (@(posedge clk_i) disable iff (!rst_ni)
                   s_axi_wvalid && s_axi_wready |-> s_axi_wlast == (beats_q == '0));

endmodule
