// gmac_pkg: constants and types shared by the point-cloud accelerator.
// Coordinates are signed Q1.15 fixed point covering the normalised range [-1,1).
// A voxel coordinate is 4 bits per axis (up to 16 segments per axis), so a
// voxel address is X*256 + Y*16 + Z (12 bits, 4096 voxels). Features are
// 16-bit signed fixed point. The 4-bit axis width and 4096-voxel space follow
// the "at most 16 segments per axis" limit; the number formats are this
// design's choice.
package gmac_pkg;
  localparam int CW      = 16;     // coordinate width (Q1.15)
  localparam int VW      = 4;      // voxel index bits per axis
  localparam int NVOX    = 4096;   // 16^3 voxels
  localparam int VAW     = 12;     // voxel address width
  localparam int MAXACT  = 1024;   // activated voxels tracked (2 KB distance buffer / 16 bit)
  localparam int AIW     = 10;     // active-list index width
  localparam int XW      = 16;     // feature width
  localparam int DW      = 16;     // distance word width

  typedef logic signed [CW-1:0] coord_t;
  typedef logic [VW-1:0]        vidx_t;
  typedef logic [VAW-1:0]       vaddr_t;

  typedef struct packed {
    coord_t x;
    coord_t y;
    coord_t z;
  } point_t;

  typedef struct packed {
    vidx_t x;
    vidx_t y;
    vidx_t z;
  } voxel_t;

  function automatic vaddr_t vox2addr(voxel_t v);
    return {v.x, v.y, v.z};
  endfunction

  function automatic voxel_t addr2vox(vaddr_t a);
    return voxel_t'(a);
  endfunction
endpackage
