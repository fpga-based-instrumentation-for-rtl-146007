// lvds_bus_slave: lets a module in the same crate reach this module's bus.
//
// NIM modules in a crate share four LVDS pairs. One carries the common
// 53 MHz clock, so every signal here is sampled with clk; "Sync" marks the
// start of a frame, "Sdat" carries the command serially and "Spare" is used
// for the reply. This makes one network connection enough for a whole crate.
//
// Frame on sdat, one bit per clock, most significant first, sync high with the
// first bit: we, slot[SLOT_W-1:0], addr[15:0], data[31:0] (FRAME_W bits).
// When the frame's slot equals slot_id the slave performs the access on the
// internal bus and then drives spare (spare_oe high) with a start bit 1
// followed by 32 data bits (the read result, or the written word echoed),
// then releases it. Frames for other slots are ignored; a frame that arrives
// while an access is in progress is dropped. The pair names follow the
// design description; the frame, reply and slot addressing are this design's.
module lvds_bus_slave
  import ap_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [SLOT_W-1:0] slot_id,
  input  logic              sync,
  input  logic              sdat,
  output logic              spare_out,
  output logic              spare_oe,
  abus_if.master            m
);
  typedef enum logic [1:0] {RX, BUS, TX} state_t;
  state_t state;

  logic [FRAME_W-2:0]         sh;
  logic [$clog2(FRAME_W)-1:0] nrx;
  logic                       rx_on;
  lvds_frame_t                fr;
  logic [32:0]                tx;
  logic [5:0]                 ntx;

  assign fr = lvds_frame_t'({sh, sdat});

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= RX;
      sh        <= '0;
      nrx       <= '0;
      rx_on     <= 1'b0;
      tx        <= '0;
      ntx       <= '0;
      spare_out <= 1'b0;
      spare_oe  <= 1'b0;
      m.req     <= 1'b0;
      m.we      <= 1'b0;
      m.addr    <= '0;
      m.wdata   <= '0;
    end else begin
      // receiver runs in every state so frames stay aligned
      if (sync) begin
        sh    <= {{(FRAME_W-2){1'b0}}, sdat};
        nrx   <= ($clog2(FRAME_W))'(FRAME_W - 2);
        rx_on <= 1'b1;
      end else if (rx_on) begin
        sh  <= {sh[FRAME_W-3:0], sdat};
        nrx <= nrx - 1'b1;
        if (nrx == '0) begin
          rx_on <= 1'b0;
          if (state == RX && fr.slot == slot_id) begin
            m.req   <= 1'b1;
            m.we    <= fr.we;
            m.addr  <= fr.addr;
            m.wdata <= fr.data;
            state   <= BUS;
          end
        end
      end
      unique case (state)
        RX: ;
        BUS: if (m.req && m.ack) begin
          m.req <= 1'b0;
          tx    <= {1'b1, m.we ? m.wdata : m.rdata};
          ntx   <= 6'd33;
          state <= TX;
        end
        TX: begin
          spare_oe  <= (ntx != 0);
          spare_out <= (ntx != 0) && tx[32];
          tx        <= tx << 1;
          if (ntx == 0) state <= RX;
          else ntx <= ntx - 1'b1;
        end
        default: state <= RX;
      endcase
    end
  end
endmodule
