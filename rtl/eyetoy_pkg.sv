// eyetoy_pkg: constants and types shared by the camera/VGA display path and
// the image-processing chain.
//
// The VGA frame totals (800 clocks per line, 525 lines per frame) are not
// free choices: the camera's frame-size registers are programmed with the
// same numbers so that camera and display run at one frame rate.  The
// register values are kept here as the 16-bit HI/LO pairs written to the
// camera (0x0320 = 800, 0x020D = 525) and the VGA totals are derived from
// them.  The visible area is the camera's 640x480 pixel array.  The sync
// pulse positions are the usual 640x480@60 Hz ones; they are this design's
// choice.
package eyetoy_pkg;

  // Camera frame-size registers (address, value written)
  localparam logic [7:0] CAM_REG_FW_HI_ADDR = 8'h04;
  localparam logic [7:0] CAM_REG_FW_LO_ADDR = 8'h05;
  localparam logic [7:0] CAM_REG_FH_HI_ADDR = 8'h06;
  localparam logic [7:0] CAM_REG_FH_LO_ADDR = 8'h07;
  localparam logic [7:0] CAM_FW_HI = 8'h03;
  localparam logic [7:0] CAM_FW_LO = 8'h20;
  localparam logic [7:0] CAM_FH_HI = 8'h02;
  localparam logic [7:0] CAM_FH_LO = 8'h0D;

  // Line and frame totals shared by camera and VGA timing
  localparam int unsigned FRAME_W = int'({CAM_FW_HI, CAM_FW_LO});  // 800
  localparam int unsigned FRAME_H = int'({CAM_FH_HI, CAM_FH_LO});  // 525

  // Visible (active) area = camera pixel array
  localparam int unsigned ACT_W = 640;
  localparam int unsigned ACT_H = 480;

  // 640x480@60 Hz sync placement (front porch, sync width)
  localparam int unsigned H_FP = 16;
  localparam int unsigned H_SW = 96;
  localparam int unsigned V_FP = 10;
  localparam int unsigned V_SW = 2;

  // Rectangle on the screen, inclusive corners, used for the wall's hole
  typedef struct packed {
    logic [9:0] x0;
    logic [9:0] x1;
    logic [9:0] y0;
    logic [9:0] y1;
  } rect_t;

  // Function of the "frame processing" core inside a processing stage
  typedef enum logic [1:0] {
    OP_THRESHOLD = 2'd0,
    OP_ERODE     = 2'd1,
    OP_DILATE    = 2'd2
  } proc_op_e;


endpackage
