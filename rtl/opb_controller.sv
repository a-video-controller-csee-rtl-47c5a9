// opb_controller: OPB slave that maps the eight video RAMs into a 4K window.
//
// OPB inputs arrive late in the cycle, so every one of them is first
// registered (ABus, DBus, RNW and select). When the registered select is high
// and the registered address falls in the window C_BASEADDR..C_HIGHADDR, the
// controller makes exactly one RAM access in that cycle: address bits [11:9]
// pick one of the eight 512-byte RAMs (0-4 the character array, 5-7 the
// font) and bits [8:0] the byte inside it. The RAMs' bus ports are always
// enabled and normally held in reset, so their outputs are zero and can be
// ORed. A read releases RST on the selected RAM for that one cycle; a write
// pulses WE on it for one cycle with the byte from DBus[7:0]. Then come
// MemCycle1, in which the RAM output (read_data) is valid and is latched, and
// MemCycle2, in which xferAck is high and the latched byte is driven on
// sl_dbus in all four byte lanes. sl_dbus is zero at all other times. The
// registered select is cleared right after the acknowledge, so a transfer is
// acknowledged once, four OPB clocks after select rises. Reset is
// asynchronous.
//
// The registered inputs, the RST/WE pulses, MemCycle1/MemCycle2 and the
// acknowledge with MemCycle2 follow the original design's timing diagrams.
// The page order, the byte lane used and the exact cycle of each step are
// this design's choices.
module opb_controller
  import vga_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR = 32'hFEFF1000,
  parameter logic [31:0] C_HIGHADDR = 32'hFEFF1FFF
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [31:0]          abus,
  input  logic [31:0]          dbus,
  input  logic                 rnw,
  input  logic                 select_i,
  output logic [31:0]          sl_dbus,
  output logic                 sl_xfer_ack,
  output logic [ALL_PAGES-1:0] ram_rst,
  output logic [ALL_PAGES-1:0] ram_we,
  output logic [RAM_AW-1:0]    ram_addr,
  output logic [7:0]           ram_di,
  input  logic [7:0]           read_data
);

  // The window is 4K: the RAMs fill it exactly.
  localparam int unsigned WINDOW = 32'(C_HIGHADDR - C_BASEADDR) + 1;
  initial assert (WINDOW == ALL_PAGES * RAM_DEPTH)
    else $error("address window does not match the RAM size");

  logic [31:0] abus_q, dbus_q;
  logic        rnw_q, select_delayed;
  opb_state_e  state;
  logic        chip_select, access;
  logic [2:0]  page;
  logic [ALL_PAGES-1:0] ram_select;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      abus_q         <= '0;
      dbus_q         <= '0;
      rnw_q          <= 1'b0;
      select_delayed <= 1'b0;
    end else begin
      abus_q         <= abus;
      dbus_q         <= dbus;
      rnw_q          <= rnw;
      select_delayed <= select_i & ~sl_xfer_ack;
    end
  end

  assign chip_select = select_delayed && (abus_q[31:12] == C_BASEADDR[31:12]);
  assign access      = chip_select && (state == OPB_IDLE);
  assign page        = abus_q[11:9];

  always_comb begin
    ram_select       = '0;
    ram_select[page] = 1'b1;
  end

  assign ram_addr = abus_q[RAM_AW-1:0];
  assign ram_di   = dbus_q[7:0];
  assign ram_we   = (access && !rnw_q) ? ram_select : '0;
  assign ram_rst  = (access &&  rnw_q) ? ~ram_select : '1;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state <= OPB_IDLE;
    else begin
      unique case (state)
        OPB_IDLE: if (access) state <= OPB_MEM1;
        OPB_MEM1: state <= select_delayed ? OPB_MEM2 : OPB_IDLE;
        OPB_MEM2: state <= OPB_IDLE;
        default:  state <= OPB_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) sl_dbus <= '0;
    else if (state == OPB_MEM1 && select_delayed && rnw_q) sl_dbus <= {4{read_data}};
    else sl_dbus <= '0;
  end

  assign sl_xfer_ack = (state == OPB_MEM2);

  // Bus rules: an acknowledge lasts one cycle, and data is zero without one.
  a_ack_one_cycle: assert property (@(posedge clk) disable iff (rst)
    sl_xfer_ack |=> !sl_xfer_ack);
  a_dbus_idle_zero: assert property (@(posedge clk) disable iff (rst)
    !sl_xfer_ack |-> sl_dbus == '0);
  a_one_access: assert property (@(posedge clk) disable iff (rst)
    $onehot0(ram_we));

endmodule
